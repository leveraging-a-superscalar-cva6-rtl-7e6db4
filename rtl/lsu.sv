// lsu: load/store unit with a word-organised data memory.
//
// One memory operation per cycle. The address is base + sign-extended 12-bit
// offset, in bytes; the two low bits are ignored (word accesses only). A
// store writes at the clock edge ending its execute cycle. A load reads the
// memory synchronously at that edge and presents its result, tagged with
// its scoreboard entry, in the following cycle (load latency: 1 register).
// Stores produce no result.
//
// A second access path (ext_*) lets the surroundings fill and inspect the
// memory; it is served only in cycles without a core access, and its read
// data also appears one cycle later. The processor's real LSU and data cache
// are pre-existing; this simple tightly-coupled memory and its size are this
// design's choice.
module lsu
  import ntt_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  // core access (from the execute stage)
  input  logic                          valid_i,
  input  logic                          we_i,
  input  logic [SB_IW-1:0]              idx_i,
  input  logic [31:0]                   base_i,
  input  logic [11:0]                   offset_i,
  input  logic [31:0]                   wdata_i,
  // load result
  output wb_t                           wb_o,
  // external access
  input  logic                          ext_en_i,
  input  logic                          ext_we_i,
  input  logic [$clog2(DMEM_WORDS)-1:0] ext_addr_i,
  input  logic [31:0]                   ext_wdata_i,
  output logic [31:0]                   ext_rdata_o
);
  localparam int unsigned AW = $clog2(DMEM_WORDS);

  logic [31:0] mem [DMEM_WORDS];

  logic [31:0]   byte_addr;
  logic [AW-1:0] waddr;
  logic          core_rd;
  logic          acc_en;
  logic          acc_we;
  logic [AW-1:0] acc_addr;
  logic [31:0]   acc_wdata;

  always_comb begin
    byte_addr = base_i + {{20{offset_i[11]}}, offset_i};
    waddr     = byte_addr[AW+1:2];
    core_rd   = valid_i && !we_i;
    if (valid_i) begin
      acc_en = 1'b1; acc_we = we_i; acc_addr = waddr; acc_wdata = wdata_i;
    end else begin
      acc_en = ext_en_i; acc_we = ext_we_i; acc_addr = ext_addr_i; acc_wdata = ext_wdata_i;
    end
  end

  logic [31:0]      rdata_q;
  logic             ld_valid_q;
  logic [SB_IW-1:0] ld_idx_q;

  always_ff @(posedge clk_i) begin
    if (acc_en) begin
      if (acc_we) mem[acc_addr] <= acc_wdata;
      else        rdata_q       <= mem[acc_addr];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ld_valid_q <= 1'b0;
      ld_idx_q   <= '0;
    end else begin
      ld_valid_q <= core_rd;
      if (core_rd) ld_idx_q <= idx_i;
    end
  end

  always_comb begin
    wb_o.valid  = ld_valid_q;
    wb_o.idx    = ld_idx_q;
    wb_o.sel    = 1'b0;
    wb_o.data   = rdata_q;
    ext_rdata_o = rdata_q;
  end
endmodule
