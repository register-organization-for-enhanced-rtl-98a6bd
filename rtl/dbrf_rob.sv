// dbrf_rob: in-order retire and recovery for the dual bank register file.
//
// Every dispatched instruction gets an entry holding the tag of the RF1 register it
// was given and the tag of the stale mapping it replaces. Both tags carry a bank
// flag which follows the transfer broadcast (xfer_mask) exactly like the map
// table, so the entry always knows in which bank each of its two registers lives.
//
// Commit (up to W per cycle, in order, once an entry is marked done): the stale
// mapping can no longer be needed and is released. If it lives in RF2 the RF2
// register becomes free to receive a value from RF1 (the conventional freeing rule,
// applied to RF2). If it was never moved and still lives in RF1, the RF1 register
// goes straight back to the rename pool.
//
// Recovery: a mispredicted branch (br_valid, br_rob) squashes every younger entry.
// It is reported when the branch resolves, before its own completion, so it can
// never be committing in the same cycle; older entries may commit alongside. An
// entry that completed with an exception squashes itself and everything younger
// when it reaches the head (exc_valid/exc_rob report it). Either way the squash
// takes one cycle: restore_valid/restore_rob name the first squashed entry, whose
// saved map state the rename stage reloads, and every squashed entry releases its
// own register in whichever bank it is in, so a squashed RF1 register returns to
// the pool and a squashed RF2 register is open to transfers again. Single-cycle
// recovery from saved map states follows the document; releasing squashed RF2
// registers is this design's reading of it.
//
// Masks rf1_free/rf2_free are combinational (from registered state and br_*) and
// take effect at the next clock edge in the banks and the pool. ROB_N must be a
// power of two.
module dbrf_rob
  import dbrf_pkg::*;
#(
  parameter int unsigned ROB_N = DEF_ROB_N,
  parameter int unsigned W     = DEF_IW,
  parameter int unsigned NPREG = DEF_NPREG,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned RW   = $clog2(ROB_N),
  localparam int unsigned CW   = $clog2(ROB_N + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // enqueue from rename
  output logic               enq_ready,
  input  logic               enq_fire,
  input  logic [W-1:0]       enq_valid,
  input  logic [W-1:0]       enq_has_dst,
  input  logic [PW-1:0]      enq_dst_preg   [W],
  input  bank_e              enq_stale_bank [W],
  input  logic [PW-1:0]      enq_stale_preg [W],
  output logic [RW-1:0]      enq_rob        [W],
  // completion from the functional units
  input  logic [W-1:0]       cpl_valid,
  input  logic [RW-1:0]      cpl_rob [W],
  input  logic [W-1:0]       cpl_exc,
  // branch misprediction
  input  logic               br_valid,
  input  logic [RW-1:0]      br_rob,
  // RF1 -> RF2 transfer broadcast
  input  logic [NPREG-1:0]   xfer_mask,
  // register release
  output logic [NPREG-1:0]   rf1_free,
  output logic [NPREG-1:0]   rf2_free,
  // squash: first squashed entry, whose saved map is reloaded
  output logic               restore_valid,
  output logic [RW-1:0]      restore_rob,
  // status
  output logic [W-1:0]       commit_valid,
  output logic               exc_valid,
  output logic [RW-1:0]      exc_rob,
  output logic [CW-1:0]      count
);

  logic          e_valid     [ROB_N];
  logic          e_done      [ROB_N];
  logic          e_exc       [ROB_N];
  logic          e_has_dst   [ROB_N];
  bank_e         e_dst_bank  [ROB_N];
  logic [PW-1:0] e_dst_preg  [ROB_N];
  bank_e         e_stale_bank[ROB_N];
  logic [PW-1:0] e_stale_preg[ROB_N];

  logic [RW-1:0] head, tail;
  logic [CW-1:0] nsq;
  logic [ROB_N-1:0] sq;
  // releases by commit (stale tags) and by squash (own tags)
  logic [NPREG-1:0] c_rf1, c_rf2, s_rf1, s_rf2;

  logic          exc_now;
  logic          ok;
  logic [RW-1:0] e;
  int unsigned   ncommit, nenq;

  function automatic bank_e moved(bank_e b, logic [PW-1:0] p, logic [NPREG-1:0] m);
    return (b == BANK_RF1 && m[p]) ? BANK_RF2 : b;
  endfunction

  always_comb begin
    // exception at the head
    exc_now   = count != 0 && e_done[head] && e_exc[head];
    exc_valid = exc_now;
    exc_rob   = head;

    enq_ready = !exc_now && !br_valid &&
                (CW'(ROB_N) - count >= CW'(W));

    // slot numbering for enqueue
    nenq = 0;
    for (int i = 0; i < W; i++) begin
      enq_rob[i] = tail + RW'(nenq);
      if (enq_valid[i]) nenq = nenq + 1;
    end
    if (!enq_fire) nenq = 0;

    // commit
    c_rf1        = '0;
    c_rf2        = '0;
    commit_valid = '0;
    ncommit      = 0;
    ok           = !exc_now;
    for (int k = 0; k < W; k++) begin
      e  = head + RW'(k);
      ok = ok && (CW'(k) < count) && e_done[e] && !e_exc[e];
      if (ok) begin
        commit_valid[k] = 1'b1;
        ncommit = ncommit + 1;
        if (e_has_dst[e]) begin
          if (e_stale_bank[e] == BANK_RF2) c_rf2[e_stale_preg[e]] = 1'b1;
          else                             c_rf1[e_stale_preg[e]] = 1'b1;
        end
      end
    end

    // squash: from restore_rob up to the tail
    restore_rob = exc_now ? head : br_rob + 1'b1;
    nsq = '0;
    if (exc_now)       nsq = count;
    else if (br_valid) nsq = CW'(RW'(tail - restore_rob));
    restore_valid = nsq != '0;
    s_rf1 = '0;
    s_rf2 = '0;
    for (int n = 0; n < ROB_N; n++) begin
      sq[n] = CW'(RW'(RW'(n) - restore_rob)) < nsq;
      if (sq[n] && e_has_dst[n]) begin
        if (e_dst_bank[n] == BANK_RF2) s_rf2[e_dst_preg[n]] = 1'b1;
        else                           s_rf1[e_dst_preg[n]] = 1'b1;
      end
    end
    rf1_free = c_rf1 | s_rf1;
    rf2_free = c_rf2 | s_rf2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      for (int n = 0; n < ROB_N; n++) begin
        e_valid[n]      <= 1'b0;
        e_done[n]       <= 1'b0;
        e_exc[n]        <= 1'b0;
        e_has_dst[n]    <= 1'b0;
        e_dst_bank[n]   <= BANK_RF1;
        e_dst_preg[n]   <= '0;
        e_stale_bank[n] <= BANK_RF1;
        e_stale_preg[n] <= '0;
      end
    end else begin
      // transfer broadcast
      for (int n = 0; n < ROB_N; n++) begin
        e_dst_bank[n]   <= moved(e_dst_bank[n], e_dst_preg[n], xfer_mask);
        e_stale_bank[n] <= moved(e_stale_bank[n], e_stale_preg[n], xfer_mask);
      end
      // completion
      for (int j = 0; j < W; j++) begin
        if (cpl_valid[j] && e_valid[cpl_rob[j]]) begin
          e_done[cpl_rob[j]] <= 1'b1;
          e_exc[cpl_rob[j]]  <= cpl_exc[j];
        end
      end
      // commit
      for (int k = 0; k < W; k++)
        if (commit_valid[k]) e_valid[head + RW'(k)] <= 1'b0;
      // enqueue
      if (enq_fire) begin
        for (int i = 0; i < W; i++) begin
          if (enq_valid[i]) begin
            e_valid[enq_rob[i]]      <= 1'b1;
            e_done[enq_rob[i]]       <= 1'b0;
            e_exc[enq_rob[i]]        <= 1'b0;
            e_has_dst[enq_rob[i]]    <= enq_has_dst[i];
            e_dst_bank[enq_rob[i]]   <= BANK_RF1;
            e_dst_preg[enq_rob[i]]   <= enq_dst_preg[i];
            e_stale_bank[enq_rob[i]] <= moved(enq_stale_bank[i], enq_stale_preg[i], xfer_mask);
            e_stale_preg[enq_rob[i]] <= enq_stale_preg[i];
          end
        end
      end
      // squash
      for (int n = 0; n < ROB_N; n++)
        if (sq[n]) e_valid[n] <= 1'b0;
      head <= head + RW'(ncommit);
      if (restore_valid) tail <= restore_rob;
      else               tail <= tail + RW'(nenq);
      count <= count + CW'(nenq) - CW'(ncommit) - nsq;
    end
  end

  // Completions and mispredictions only refer to live entries.
  a_br_live: assert property (@(posedge clk) disable iff (!rst_n)
                              !(br_valid && (!e_valid[br_rob] || e_done[br_rob])))
    else $error("dbrf_rob: misprediction reported for a dead or completed entry");

endmodule
