// dbrf_rf1: register bank RF1 of the dual bank register file.
//
// RF1 is the bank the renamer allocates from. Every result coming back from the
// functional units is written here (NWR write ports, one per issue slot), and the
// operand read ports (NRD = 2*IW) read it like any register file. In addition each
// of the NBUS transfer buses has a read port of its own, through which the transfer
// unit copies a finished value into the register of the same index in RF2.
//
// Next to the data the bank keeps one "written" bit per register: it is set by a
// write and cleared when the register goes back to the free pool (free_mask), which
// happens after a transfer, at commit or on a squash. A register whose written bit
// is set has passed time t1 of its lifetime and is eligible for transfer.
//
// Timing: reads are combinational from the register array; the read latency of the
// bank (one cycle in the main configuration) is formed by the operand mux that
// follows. Writes and free_mask take effect at the rising clock edge. If a register
// is written and freed in the same cycle (a squashed instruction writing back in the
// cycle of its squash) the free wins and the written bit ends up clear; the data
// word is don't-care. That priority is this design's own choice.
// Reset clears the written bits; the data array is cleared as well so that the
// contents are defined. The reset policy is this design's own choice.
module dbrf_rf1
  import dbrf_pkg::*;
#(
  parameter int unsigned NPREG  = DEF_NPREG,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned NRD    = 2 * DEF_IW,
  parameter int unsigned NWR    = DEF_IW,
  parameter int unsigned NBUS   = DEF_IW,
  localparam int unsigned PW    = $clog2(NPREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // writeback ports from the functional units
  input  logic [NWR-1:0]       wr_en,
  input  logic [PW-1:0]        wr_idx   [NWR],
  input  logic [DATA_W-1:0]    wr_data  [NWR],
  // registers returned to the free pool this cycle
  input  logic [NPREG-1:0]     free_mask,
  // operand read ports
  input  logic [PW-1:0]        rd_idx   [NRD],
  output logic [DATA_W-1:0]    rd_data  [NRD],
  // transfer bus read ports
  input  logic [PW-1:0]        xfer_idx  [NBUS],
  output logic [DATA_W-1:0]    xfer_data [NBUS],
  // per-register "value present" bits
  output logic [NPREG-1:0]     written
);

  logic [DATA_W-1:0] mem [NPREG];
  logic [NPREG-1:0]  wr_set;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      for (int p = 0; p < NPREG; p++) mem[p] <= '0;
    end else begin
      written <= (written | wr_set) & ~free_mask;
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) mem[wr_idx[w]] <= wr_data[w];
    end
  end

  always_comb begin
    wr_set = '0;
    for (int w = 0; w < NWR; w++)
      if (wr_en[w]) wr_set[wr_idx[w]] = 1'b1;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)  rd_data[r]   = mem[rd_idx[r]];
    for (int b = 0; b < NBUS; b++) xfer_data[b] = mem[xfer_idx[b]];
  end

endmodule
