// dbrf_rename: register map table with a bank flag per mapping, and the saved map
// state of every in-flight instruction.
//
// The table maps each logical register to a physical register index plus a flag
// telling whether the value of that mapping is currently in RF1 or in RF2. At
// dispatch, each instruction of a group of up to W that writes a register gets a
// free RF1 register from the pool, and the old mapping of its destination (the
// "stale" mapping, freed when this instruction commits) is handed to the reorder
// buffer. Sources are translated through the table; a source written by an earlier
// instruction of the same group takes that instruction's new register instead.
//
// Bank flags: when the transfer unit moves register p from RF1 to RF2 (xfer_mask),
// every entry that says "p in RF1" is changed to "p in RF2" at the same clock edge.
// Tags leaving this module in that cycle already carry the new flag. Register p in
// RF1 may be handed out again right after, so two live mappings can share index p:
// the older one flagged RF2, the newer one RF1.
//
// Saved map state: for every dispatched instruction the table as it was just before
// that instruction renamed is stored under its reorder buffer entry (disp_rob). A
// squash that starts at entry restore_rob (restore_valid) reloads the live table
// from that copy in one cycle, so the mappings of all squashed instructions vanish
// at once. Keeping a copy per in-flight instruction follows the precise-exception
// scheme of the reference core. The copies are not rewritten on transfers; instead
// each entry collects the indices transferred since its copy was taken (ck_moved).
// A saved "p in RF1" whose p has moved since then is read back as "p in RF2": the
// mapping is still live at the restore, so the first transfer of p after the copy
// was its own. This bookkeeping is this design's own choice.
//
// Dispatch is all-or-nothing per group: the group goes (disp_fire) when the
// reorder buffer accepts it (rob_ready) and the pool has a register for every
// destination in it; otherwise it is held, and stall_noreg reports the cycles lost
// to an empty RF1 pool. Group-level stalling is this design's own choice.
//
// Reset maps logical register i to RF2 register i, where the initial (zero) values
// live; this start-up state is this design's own choice. The saved copies are not
// reset: an entry is only restored after it has been written at dispatch.
module dbrf_rename
  import dbrf_pkg::*;
#(
  parameter int unsigned NLREG = DEF_NLREG,
  parameter int unsigned NPREG = DEF_NPREG,
  parameter int unsigned W     = DEF_IW,
  parameter int unsigned ROB_N = DEF_ROB_N,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned LW   = $clog2(NLREG),
  localparam int unsigned RW   = $clog2(ROB_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction group from decode
  input  logic [W-1:0]       disp_valid,
  input  logic [W-1:0]       disp_has_dst,
  input  logic [LW-1:0]      disp_dst  [W],
  input  logic [LW-1:0]      disp_src1 [W],
  input  logic [LW-1:0]      disp_src2 [W],
  input  logic [RW-1:0]      disp_rob  [W],
  input  logic               rob_ready,
  output logic               disp_fire,
  output logic               stall_noreg,
  // renamed tags
  output bank_e              src1_bank  [W],
  output logic [PW-1:0]      src1_preg  [W],
  output bank_e              src2_bank  [W],
  output logic [PW-1:0]      src2_preg  [W],
  output logic [PW-1:0]      dst_preg   [W],
  output bank_e              stale_bank [W],
  output logic [PW-1:0]      stale_preg [W],
  // RF1 free pool
  input  logic [W-1:0]       cand_valid,
  input  logic [PW-1:0]      cand_idx [W],
  output logic [W-1:0]       take,
  // RF1 -> RF2 transfer broadcast
  input  logic [NPREG-1:0]   xfer_mask,
  // squash: reload the map saved for this entry
  input  logic               restore_valid,
  input  logic [RW-1:0]      restore_rob
);

  bank_e         map_bank [NLREG];
  logic [PW-1:0] map_preg [NLREG];
  // saved copies, one word per entry: NLREG fields of {bank, index}
  localparam int unsigned SW = NLREG * (PW + 1);
  logic [SW-1:0]    ck_mem   [ROB_N];
  logic [NPREG-1:0] ck_moved [ROB_N];
  logic [SW-1:0]    snap     [W];
  logic [SW-1:0]    ck_word;
  logic [NPREG-1:0] ck_mv;
  bank_e            rs_bank  [NLREG];
  logic [PW-1:0]    rs_preg  [NLREG];

  // view[i]: the table as instruction i of the group sees it
  bank_e         view_bank [W+1][NLREG];
  logic [PW-1:0] view_preg [W+1][NLREG];

  logic [W-1:0]  needs;
  logic          enough;
  int unsigned   nneed;
  int unsigned   k;

  // Flag of a mapping after this cycle's transfers.
  function automatic bank_e moved(bank_e b, logic [PW-1:0] p, logic [NPREG-1:0] m);
    return (b == BANK_RF1 && m[p]) ? BANK_RF2 : b;
  endfunction

  always_comb begin
    needs = disp_valid & disp_has_dst;
    nneed = $countones(needs);
    enough = (nneed == 0) || cand_valid[nneed-1];
    disp_fire   = rob_ready && enough && (disp_valid != '0);
    stall_noreg = rob_ready && !enough && (disp_valid != '0);

    take = '0;
    k = 0;
    for (int i = 0; i < W; i++) begin
      dst_preg[i] = '0;
      if (needs[i]) begin
        dst_preg[i] = cand_idx[k];
        take[k]     = disp_fire;
        k = k + 1;
      end
    end

    for (int l = 0; l < NLREG; l++) begin
      view_bank[0][l] = moved(map_bank[l], map_preg[l], xfer_mask);
      view_preg[0][l] = map_preg[l];
    end
    for (int i = 0; i < W; i++) begin
      for (int l = 0; l < NLREG; l++) begin
        view_bank[i+1][l] = view_bank[i][l];
        view_preg[i+1][l] = view_preg[i][l];
      end
      if (needs[i]) begin
        view_bank[i+1][disp_dst[i]] = BANK_RF1;
        view_preg[i+1][disp_dst[i]] = dst_preg[i];
      end
      for (int l = 0; l < NLREG; l++)
        snap[i][l*(PW+1) +: PW+1] = {view_bank[i][l], view_preg[i][l]};
      src1_bank[i]  = view_bank[i][disp_src1[i]];
      src1_preg[i]  = view_preg[i][disp_src1[i]];
      src2_bank[i]  = view_bank[i][disp_src2[i]];
      src2_preg[i]  = view_preg[i][disp_src2[i]];
      stale_bank[i] = view_bank[i][disp_dst[i]];
      stale_preg[i] = view_preg[i][disp_dst[i]];
    end

    // saved copy of the squash point, with the transfers since it was taken
    ck_word = ck_mem[restore_rob];
    ck_mv   = ck_moved[restore_rob] | xfer_mask;
    for (int l = 0; l < NLREG; l++) begin
      rs_bank[l] = bank_e'(ck_word[l*(PW+1) + PW]);
      rs_preg[l] = ck_word[l*(PW+1) +: PW];
      if (rs_bank[l] == BANK_RF1 && ck_mv[rs_preg[l]]) rs_bank[l] = BANK_RF2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLREG; l++) begin
        map_bank[l] <= BANK_RF2;
        map_preg[l] <= PW'(l);
      end
    end else if (restore_valid) begin
      for (int l = 0; l < NLREG; l++) begin
        map_bank[l] <= rs_bank[l];
        map_preg[l] <= rs_preg[l];
      end
    end else if (disp_fire) begin
      for (int l = 0; l < NLREG; l++) begin
        map_bank[l] <= view_bank[W][l];
        map_preg[l] <= view_preg[W][l];
      end
    end else begin
      for (int l = 0; l < NLREG; l++) map_bank[l] <= view_bank[0][l];
    end
  end

  // saved copies: written at dispatch only, read only for entries written before
  always_ff @(posedge clk) begin
    if (disp_fire)
      for (int i = 0; i < W; i++)
        if (disp_valid[i]) ck_mem[disp_rob[i]] <= snap[i];
  end

  // transfers since each copy was taken (the copy itself includes this cycle's)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < ROB_N; n++) ck_moved[n] <= '0;
    end else begin
      for (int n = 0; n < ROB_N; n++) ck_moved[n] <= ck_moved[n] | xfer_mask;
      if (disp_fire)
        for (int i = 0; i < W; i++)
          if (disp_valid[i]) ck_moved[disp_rob[i]] <= '0;
    end
  end

  // Dispatch and recovery never overlap.
  a_no_dispatch_in_restore: assert property (@(posedge clk) disable iff (!rst_n)
                                             !(disp_fire && restore_valid))
    else $error("dbrf_rename: dispatch during map restore");

endmodule
