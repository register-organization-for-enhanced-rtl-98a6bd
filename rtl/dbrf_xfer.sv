// dbrf_xfer: RF1 -> RF2 transfer selection.
//
// A value moves from RF1 register p into RF2 register p when both conditions hold:
// RF2 register p is free, and RF1 register p already holds its value (time t1 of the
// mapping has passed). Moving it frees RF1 register p for the next renaming, long
// before the mapping itself dies. Up to NBUS registers move per cycle, one per
// transfer bus; when more are eligible the lowest indices go first and the rest wait
// for a later cycle (the priority order is this design's own choice).
//
// block_mask lists RF1 registers that are being released this very cycle by commit
// or by a squash; they are not transferred, so a register is never freed twice.
//
// The unit is purely combinational: xfer_valid/xfer_idx drive the RF1 transfer read
// ports and the RF2 write ports in the same cycle, and xfer_mask (one bit per
// register index) is the broadcast that tells the map table, the reorder buffer and
// every in-flight operand holding "p in RF1" that p now lives in RF2. Everything
// updates at the same clock edge.
module dbrf_xfer
  import dbrf_pkg::*;
#(
  parameter int unsigned NPREG = DEF_NPREG,
  parameter int unsigned NBUS  = DEF_IW,
  localparam int unsigned PW   = $clog2(NPREG)
) (
  input  logic [NPREG-1:0] rf1_written,
  input  logic [NPREG-1:0] rf2_busy,
  input  logic [NPREG-1:0] block_mask,
  output logic [NBUS-1:0]  xfer_valid,
  output logic [PW-1:0]    xfer_idx [NBUS],
  output logic [NPREG-1:0] xfer_mask
);

  logic [NPREG-1:0] cand;
  localparam int unsigned BW = (NBUS > 1) ? $clog2(NBUS) : 1;
  int unsigned      n;

  always_comb begin
    cand      = rf1_written & ~rf2_busy & ~block_mask;
    xfer_mask = '0;
    xfer_valid = '0;
    for (int b = 0; b < NBUS; b++) xfer_idx[b] = '0;
    n = 0;
    for (int p = 0; p < NPREG; p++) begin
      if (cand[p] && n < NBUS) begin
        xfer_valid[n[BW-1:0]] = 1'b1;
        xfer_idx[n[BW-1:0]]   = PW'(p);
        xfer_mask[p] = 1'b1;
        n = n + 1;
      end
    end
  end

endmodule
