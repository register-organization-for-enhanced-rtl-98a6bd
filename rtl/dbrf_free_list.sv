// dbrf_free_list: pool of free RF1 registers used for renaming.
//
// Only RF1 registers are handed out to new logical destinations; RF2 registers are
// never allocated by the renamer. The pool is a bit vector with one bit per RF1
// register. Each cycle it offers the W lowest-numbered free registers (cand_idx,
// cand_valid); the renamer takes a prefix of them (take) for the destinations of
// the instructions it dispatches, and those bits clear at the clock edge.
//
// Registers return to the pool through free_mask: after their value has been moved
// to RF2, when a stale mapping still held in RF1 dies at commit, or when the
// instruction that allocated them is squashed. A returned register is offered again
// from the next cycle on. free_count lets the renamer see when the pool is empty,
// which is when dispatch must stall.
//
// Reset: every RF1 register is free (the initial architectural values live in RF2).
// The bit-vector organisation and lowest-first order are this design's own choice.
module dbrf_free_list
  import dbrf_pkg::*;
#(
  parameter int unsigned NPREG = DEF_NPREG,
  parameter int unsigned W     = DEF_IW,
  localparam int unsigned PW   = $clog2(NPREG)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [W-1:0]              cand_valid,
  output logic [PW-1:0]             cand_idx [W],
  input  logic [W-1:0]              take,
  input  logic [NPREG-1:0]          free_mask,
  output logic [$clog2(NPREG+1)-1:0] free_count
);

  logic [NPREG-1:0] free_q;
  logic [NPREG-1:0] take_mask;
  localparam int unsigned BW = (W > 1) ? $clog2(W) : 1;
  int unsigned      n;

  always_comb begin
    cand_valid = '0;
    for (int i = 0; i < W; i++) cand_idx[i] = '0;
    n = 0;
    for (int p = 0; p < NPREG; p++) begin
      if (free_q[p] && n < W) begin
        cand_valid[n[BW-1:0]] = 1'b1;
        cand_idx[n[BW-1:0]]   = PW'(p);
        n = n + 1;
      end
    end
  end

  always_comb begin
    take_mask = '0;
    for (int i = 0; i < W; i++)
      if (take[i] && cand_valid[i]) take_mask[cand_idx[i]] = 1'b1;
  end

  assign free_count = $bits(free_count)'($countones(free_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free_q <= '1;
    else        free_q <= (free_q & ~take_mask) | free_mask;
  end

  // A register is never returned while it is still free, nor taken unless offered.
  a_no_double_return: assert property (@(posedge clk) disable iff (!rst_n)
                                       (free_mask & free_q) == '0)
    else $error("dbrf_free_list: register returned twice");
  a_take_offered: assert property (@(posedge clk) disable iff (!rst_n)
                                   (take & ~cand_valid) == '0)
    else $error("dbrf_free_list: took a register that was not offered");

endmodule
