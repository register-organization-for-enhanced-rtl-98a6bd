// tb_dbrf_rob: self-checking test of retire and recovery.
//
// A queue of shadow entries (oldest first) mirrors the reorder buffer. Random groups
// are enqueued, random live entries complete (some with an exception), random
// unfinished entries report a misprediction, and random transfer masks move tags
// from RF1 to RF2. Expected each cycle, from the rules of the design:
//   - commit: the oldest finished, exception-free entries, at most W; each releases
//     its stale register in the bank its flag names;
//   - an exception at the head squashes it and everything younger;
//   - a misprediction squashes everything younger than the branch;
//   - a squash happens in one cycle: it names the first squashed entry (whose saved
//     map the rename stage reloads) and every squashed entry releases its own
//     register in the bank its flag names.
module tb_dbrf_rob;
  import dbrf_pkg::*;

  localparam int unsigned ROB_N = DEF_ROB_N, W = DEF_IW, NPREG = DEF_NPREG;
  localparam int unsigned PW = $clog2(NPREG), RW = $clog2(ROB_N);
  localparam int unsigned CW = $clog2(ROB_N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          enq_ready, enq_fire;
  logic [W-1:0]  enq_valid, enq_has_dst;
  logic [PW-1:0] enq_dst_preg [W], enq_stale_preg [W];
  bank_e         enq_stale_bank [W];
  logic [RW-1:0] enq_rob [W];
  logic [W-1:0]  cpl_valid, cpl_exc;
  logic [RW-1:0] cpl_rob [W];
  logic          br_valid;
  logic [RW-1:0] br_rob;
  logic [NPREG-1:0] xfer_mask, rf1_free, rf2_free;
  logic          restore_valid;
  logic [RW-1:0] restore_rob;
  logic [W-1:0]  commit_valid;
  logic          exc_valid;
  logic [RW-1:0] exc_rob;
  logic [CW-1:0] count;

  dbrf_rob dut (.*);

  typedef struct {
    int idx; bit done, exc, has_dst;
    bank_e db; logic [PW-1:0] dp; bank_e sb; logic [PW-1:0] sp;
  } ent_t;
  ent_t q [$];
  int   tail = 0;

  int checks = 0, failures = 0;
  int n_commit = 0, n_exc = 0, n_br = 0, n_sq = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPREG-1:0] e1, e2;
    logic [W-1:0] ecommit;
    bit eexc, eready;
    int ncom, nenq, nsq, first, sel;
    bit used [ROB_N];

    enq_fire = 0; enq_valid = '0; enq_has_dst = '0; cpl_valid = '0; cpl_exc = '0;
    br_valid = 0; br_rob = '0; xfer_mask = '0;
    for (int i = 0; i < W; i++) begin
      enq_dst_preg[i] = '0; enq_stale_preg[i] = '0;
      enq_stale_bank[i] = BANK_RF1; cpl_rob[i] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // random stimulus
      for (int p = 0; p < NPREG; p++) xfer_mask[p] = ($urandom_range(0, 15) == 0);
      cpl_valid = '0; cpl_exc = '0;
      foreach (used[i]) used[i] = 0;
      for (int j = 0; j < W; j++) begin
        if (q.size() > 0 && $urandom_range(0, 2) != 0) begin
          sel = $urandom_range(0, q.size() - 1);
          if (!used[q[sel].idx] && !q[sel].done) begin
            used[q[sel].idx] = 1;
            cpl_valid[j] = 1;
            cpl_rob[j]   = RW'(q[sel].idx);
            cpl_exc[j]   = ($urandom_range(0, 99) == 0);
          end
        end
      end
      eexc = q.size() > 0 && q[0].done && q[0].exc;
      br_valid = 0;
      if (q.size() > 1 && $urandom_range(0, 29) == 0) begin
        sel = $urandom_range(0, q.size() - 1);
        if (!q[sel].done) begin br_valid = 1; br_rob = RW'(q[sel].idx); end
      end
      for (int i = 0; i < W; i++) begin
        enq_valid[i]      = $urandom_range(0, 5) != 0;
        enq_has_dst[i]    = $urandom_range(0, 5) != 0;
        enq_dst_preg[i]   = PW'($urandom_range(0, NPREG - 1));
        enq_stale_bank[i] = $urandom_range(0, 1) ? BANK_RF2 : BANK_RF1;
        enq_stale_preg[i] = PW'($urandom_range(0, NPREG - 1));
      end
      #1;
      eready = !eexc && !br_valid && (ROB_N - q.size() >= W);
      chk(enq_ready == eready, "enq_ready");
      enq_fire = enq_ready && ($urandom_range(0, 3) != 0) && ($urandom_range(0, 99) < 100 - q.size() / 2);
      #1;
      // expected releases
      e1 = '0; e2 = '0; ecommit = '0; ncom = 0;
      for (int k = 0; k < W && k < q.size() && !eexc; k++) begin
        if (!(q[k].done && !q[k].exc)) break;
        ecommit[k] = 1; ncom++;
        if (q[k].has_dst) begin
          if (q[k].sb == BANK_RF2) e2[q[k].sp] = 1; else e1[q[k].sp] = 1;
        end
      end
      // squash: queue positions first .. end
      first = q.size();
      if (eexc) first = 0;
      else if (br_valid) foreach (q[i]) if (q[i].idx == int'(br_rob)) first = i + 1;
      nsq = q.size() - first;
      for (int k = first; k < q.size(); k++)
        if (q[k].has_dst) begin
          if (q[k].db == BANK_RF2) e2[q[k].dp] = 1; else e1[q[k].dp] = 1;
        end
      chk(commit_valid == ecommit, "commit set");
      chk(restore_valid == (nsq != 0), "restore request");
      if (nsq != 0) chk(int'(restore_rob) == q[first].idx, "restore entry");
      chk(rf1_free == e1, "RF1 release mask");
      chk(rf2_free == e2, "RF2 release mask");
      chk(exc_valid == eexc, "exception flag");
      if (eexc) chk(int'(exc_rob) == q[0].idx, "exception entry");
      chk(int'(count) == q.size(), "occupancy");
      nenq = 0;
      for (int i = 0; i < W; i++) if (enq_valid[i]) begin
        chk(int'(enq_rob[i]) == (tail + nenq) % ROB_N, "enqueue index");
        nenq++;
      end
      @(posedge clk);
      // update the shadow state as the design should
      foreach (q[i]) begin
        if (q[i].db == BANK_RF1 && xfer_mask[q[i].dp]) q[i].db = BANK_RF2;
        if (q[i].sb == BANK_RF1 && xfer_mask[q[i].sp]) q[i].sb = BANK_RF2;
      end
      for (int j = 0; j < W; j++) if (cpl_valid[j])
        foreach (q[i]) if (q[i].idx == int'(cpl_rob[j])) begin q[i].done = 1; q[i].exc = cpl_exc[j]; end
      for (int k = 0; k < nsq; k++) begin void'(q.pop_back()); n_sq++; end
      if (nsq != 0) tail = (tail - nsq + ROB_N) % ROB_N;
      for (int k = 0; k < ncom; k++) begin void'(q.pop_front()); n_commit++; end
      if (enq_fire) begin
        for (int i = 0; i < W; i++) if (enq_valid[i]) begin
          ent_t t;
          t.idx = tail; t.done = 0; t.exc = 0; t.has_dst = enq_has_dst[i];
          t.db = BANK_RF1; t.dp = enq_dst_preg[i];
          t.sb = (enq_stale_bank[i] == BANK_RF1 && xfer_mask[enq_stale_preg[i]]) ? BANK_RF2 : enq_stale_bank[i];
          t.sp = enq_stale_preg[i];
          q.push_back(t);
          tail = (tail + 1) % ROB_N;
        end
      end
      if (eexc) n_exc++;
      else if (br_valid) n_br++;
    end
    $display("commits=%0d exceptions=%0d mispredicts=%0d squashed=%0d", n_commit, n_exc, n_br, n_sq);
    checks++;
    if (n_commit == 0 || n_exc == 0 || n_br == 0 || n_sq == 0) begin failures++; $display("a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
