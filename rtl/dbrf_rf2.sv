// dbrf_rf2: register bank RF2 of the dual bank register file.
//
// RF2 holds values for the second part of their lifetime, from the moment RF1 hands
// them over until the mapping is dead, i.e. until a later instruction writing the
// same logical register commits. RF2 is never written by the functional units: its
// only write ports are the NBUS transfer buses from RF1, and a transfer always goes
// from register p of RF1 to register p of RF2 (direct mapping). It has the same
// number of operand read ports as RF1 (2*IW).
//
// One "busy" bit per register tells whether the register holds a live value. A
// transfer sets it, free_mask (commit of the next writer, or a squash) clears it.
// A register is a transfer target only while its busy bit is clear.
//
// Reset: the first INIT_BUSY registers hold the initial architectural state (the
// renamer maps logical register i to RF2 register i), so they come out of reset
// busy with value zero; all others are free. This start-up state is this design's
// own choice. Reads are combinational; writes take effect at the clock edge.
module dbrf_rf2
  import dbrf_pkg::*;
#(
  parameter int unsigned NPREG     = DEF_NPREG,
  parameter int unsigned DATA_W    = DEF_DATA_W,
  parameter int unsigned NRD       = 2 * DEF_IW,
  parameter int unsigned NBUS      = DEF_IW,
  parameter int unsigned INIT_BUSY = DEF_NLREG,
  localparam int unsigned PW       = $clog2(NPREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transfer buses from RF1
  input  logic [NBUS-1:0]      xfer_valid,
  input  logic [PW-1:0]        xfer_idx  [NBUS],
  input  logic [DATA_W-1:0]    xfer_data [NBUS],
  // registers released this cycle
  input  logic [NPREG-1:0]     free_mask,
  // operand read ports
  input  logic [PW-1:0]        rd_idx  [NRD],
  output logic [DATA_W-1:0]    rd_data [NRD],
  output logic [NPREG-1:0]     busy
);

  logic [DATA_W-1:0] mem [NPREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPREG; p++) begin
        mem[p]  <= '0;
        busy[p] <= (p < INIT_BUSY);
      end
    end else begin
      busy <= busy & ~free_mask;
      for (int b = 0; b < NBUS; b++) begin
        if (xfer_valid[b]) begin
          mem[xfer_idx[b]]  <= xfer_data[b];
          busy[xfer_idx[b]] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = mem[rd_idx[r]];
  end

  // A transfer may only land in a free RF2 register.
  for (genvar b = 0; b < NBUS; b++) begin : g_xfer_chk
    a_xfer_into_free: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(xfer_valid[b] && busy[xfer_idx[b]]))
      else $error("dbrf_rf2: transfer into busy register %0d", xfer_idx[b]);
  end

endmodule
