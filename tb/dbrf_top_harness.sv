// dbrf_top_harness: model core around one dbrf_top instance of a chosen size.
//
// Used by tb_dbrf_top_configs to run the configurations other than the default one.
// The model core and checks are those of tb_dbrf_top: random instruction groups are
// renamed, issued out of order, read their operands (compared with program-order
// golden values exactly RD_LAT cycles after the read), write back and retire, with
// random mispredictions and exceptions. At the end the logical registers are read
// back and the register accounting is checked, and each mechanism (transfers, RF2
// reads, an index live in both banks, releases at commit and squash in both banks,
// mispredictions, exceptions) must have occurred. Stalls on an empty RF1 pool are
// required only when the pool is smaller than the reorder buffer (REQ_STALL); with
// 128 RF1 registers the 128-entry reorder buffer fills first.
// Execution pauses for 50 of every 400 cycles so the instruction window fills.
// The harness raises 'done' and reports its counts instead of ending the simulation.
module dbrf_top_harness
  import dbrf_pkg::*;
#(
  parameter int unsigned IW_P     = DEF_IW,
  parameter int unsigned NPREG_P  = DEF_NPREG,
  parameter int unsigned RD_LAT_P = DEF_RD_LAT,
  parameter int          RUN_P    = 20000,
  parameter bit          REQ_STALL = 1'b1
) (
  output bit done,
  output int checks,
  output int failures
);

  localparam int unsigned IW     = IW_P;
  localparam int unsigned NPREG  = NPREG_P;
  localparam int unsigned NLREG  = DEF_NLREG;
  localparam int unsigned DATA_W = DEF_DATA_W;
  localparam int unsigned ROB_N  = DEF_ROB_N;
  localparam int unsigned RD_LAT = RD_LAT_P;
  localparam int unsigned NRD    = 2 * IW;
  localparam int unsigned PW     = $clog2(NPREG);
  localparam int unsigned LW     = $clog2(NLREG);
  localparam int unsigned RW     = $clog2(ROB_N);
  localparam int unsigned CW     = $clog2(ROB_N + 1);
  localparam int          RUN_CYCLES = RUN_P;
  localparam int          WATCHDOG   = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [IW-1:0]     disp_valid, disp_has_dst;
  logic [LW-1:0]     disp_dst [IW], disp_src1 [IW], disp_src2 [IW];
  logic              disp_fire, stall_noreg;
  bank_e             src1_bank [IW], src2_bank [IW];
  logic [PW-1:0]     src1_preg [IW], src2_preg [IW], dst_preg [IW];
  logic [RW-1:0]     disp_rob [IW];
  bank_e             rd_bank [NRD];
  logic [PW-1:0]     rd_preg [NRD];
  logic [DATA_W-1:0] rd_data [NRD];
  logic [IW-1:0]     wb_valid;
  logic [PW-1:0]     wb_preg [IW];
  logic [DATA_W-1:0] wb_data [IW];
  logic [IW-1:0]     cpl_valid, cpl_exc;
  logic [RW-1:0]     cpl_rob [IW];
  logic              br_valid;
  logic [RW-1:0]     br_rob;
  logic [NPREG-1:0]  xfer_mask;
  logic [IW-1:0]     commit_valid;
  logic              exc_valid, squash_valid;
  logic [RW-1:0]     exc_rob;
  logic [CW-1:0]     rob_count;
  logic [$clog2(NPREG+1)-1:0] rf1_free_count;
  logic [NPREG-1:0]  rf2_busy;

  dbrf_top #(.IW(IW), .NPREG(NPREG), .RD_LAT(RD_LAT)) dut (.*);

  // ---------------- testbench-side instruction records, indexed by ROB entry
  typedef struct {
    bit               live;
    longint unsigned  seq;
    bit               has_dst;
    logic [LW-1:0]    dst;
    logic [PW-1:0]    dpreg;
    bank_e            sb   [2];
    logic [PW-1:0]    sp   [2];
    logic [DATA_W-1:0] sval [2];
    int               prod_rob [2];   // producer entry, -1 if value was architectural
    longint unsigned  prod_seq [2];
    logic [DATA_W-1:0] result;
    logic [DATA_W-1:0] old_gold;
    int               old_prod_rob;
    longint unsigned  old_prod_seq;
    bit               issued, written, done, exc;
  } rec_t;

  rec_t              rec [ROB_N];
  logic [DATA_W-1:0] gold [NLREG];
  int                lprod_rob [NLREG];
  longint unsigned   lprod_seq [NLREG];
  longint unsigned   seq_ctr = 1;
  int unsigned       rob_tail_tb = 0;     // tb view of the next ROB entry
  int                young [$];           // live entries, oldest first

  int n_xfer = 0, n_rd_rf2 = 0, n_both_live = 0, n_stall = 0, n_commit = 0;
  int n_commit_rf1 = 0, n_commit_rf2 = 0, n_sq_rf1 = 0, n_sq_rf2 = 0;
  int n_mispredict = 0, n_exc = 0;
  int cycle = 0;
  bit final_phase = 0;

  // reads in flight: entry, seq, issue cycle
  typedef struct { int rob; longint unsigned seq; int slot; int cyc; } rd_t;
  rd_t inflight [$];

  function automatic logic [DATA_W-1:0] f_result(logic [DATA_W-1:0] a, logic [DATA_W-1:0] b,
                                                 longint unsigned s);
    return a * 3 + b + 64'(s) * 64'h9E37_79B9_7F4A_7C15;
  endfunction

  function automatic bit src_ready(int r, int k);
    int p = rec[r].prod_rob[k];
    if (p < 0) return 1;
    if (!rec[p].live || rec[p].seq != rec[r].prod_seq[k]) return 1;
    return rec[p].written;
  endfunction

  // undo every live record from entry 'from' (inclusive) to the youngest
  task automatic squash_from(int from);
    int r;
    while (young.size() > 0) begin
      r = young[$];
      if (rec[r].has_dst) begin
        gold[rec[r].dst]      = rec[r].old_gold;
        lprod_rob[rec[r].dst] = rec[r].old_prod_rob;
        lprod_seq[rec[r].dst] = rec[r].old_prod_seq;
      end
      rec[r].live = 0;
      void'(young.pop_back());
      rob_tail_tb = r;
      if (r == from) break;
    end
  endtask

  function automatic bit idx_live_in_rf1(logic [PW-1:0] p);
    foreach (young[i]) if (rec[young[i]].has_dst && rec[young[i]].dpreg == p) return 1;
    return 0;
  endfunction


  // release counting (observation only)
  always @(posedge clk) if (rst_n) begin
    n_xfer += $countones(xfer_mask);
    n_commit_rf1 += $countones(dut.u_rob.c_rf1);
    n_commit_rf2 += $countones(dut.u_rob.c_rf2);
    n_sq_rf1     += $countones(dut.u_rob.s_rf1);
    n_sq_rf2     += $countones(dut.u_rob.s_rf2);
  end

  task automatic drive_idle();
    disp_valid = '0; disp_has_dst = '0; wb_valid = '0; cpl_valid = '0; cpl_exc = '0;
    br_valid = 0; br_rob = '0;
    for (int i = 0; i < IW; i++) begin
      disp_dst[i] = '0; disp_src1[i] = '0; disp_src2[i] = '0;
      wb_preg[i] = '0; wb_data[i] = '0; cpl_rob[i] = '0;
    end
    for (int r = 0; r < NRD; r++) begin rd_bank[r] = BANK_RF1; rd_preg[r] = '0; end
  endtask

  // final readback: tags of all logical registers
  bank_e         fin_bank [NLREG];
  logic [PW-1:0] fin_preg [NLREG];
  int            fin_next = 0;

  task automatic one_cycle(bit allow_dispatch, bit readback);
    int nwb, nrd, r, sel;
    bit exc_seen;
    int wrote [$];
    @(negedge clk);
    drive_idle();
    #1;
    cycle++;
    exc_seen = exc_valid;
    if (young.size() != int'(rob_count) && failures < 3) begin
      failures++;
      $display("cycle %0d: rob_count %0d, testbench holds %0d", cycle, rob_count, young.size());
    end

    // 1. operands that were read RD_LAT cycles ago: check, write back, complete
    nwb = 0;
    while (inflight.size() > 0 && inflight[0].cyc + RD_LAT <= cycle) begin
      rd_t q = inflight.pop_front();
      if (inflight.size() >= 0 && q.cyc + RD_LAT != cycle) begin
        failures++; checks++;
        $display("read latency violated");
      end
      if (rec[q.rob].live && rec[q.rob].seq == q.seq) begin
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (rd_data[2*q.slot+k] !== rec[q.rob].sval[k]) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d: entry %0d operand %0d read %h expected %h (bank %0d preg %0d)",
                       cycle, q.rob, k, rd_data[2*q.slot+k], rec[q.rob].sval[k],
                       rec[q.rob].sb[k], rec[q.rob].sp[k]);
          end
        end
        if (!exc_seen) begin
          wb_valid[nwb] = rec[q.rob].has_dst;
          wb_preg[nwb]  = rec[q.rob].dpreg;
          wb_data[nwb]  = rec[q.rob].result;
          cpl_valid[nwb] = 1;
          cpl_rob[nwb]   = RW'(q.rob);
          cpl_exc[nwb]   = rec[q.rob].exc;
          rec[q.rob].done = 1;
          wrote.push_back(q.rob);
          nwb++;
        end else begin
          rec[q.rob].issued = 0;   // let it issue again if it survives
        end
      end
    end

    // 2. exception at the head: roll back everything from it
    if (exc_seen) begin
      n_exc++;
      squash_from(int'(exc_rob));
    end

    // 3. issue: pick up to IW ready entries, random order preference
    nrd = 0;
    // every 400 cycles execution pauses for 50 (a long-latency event), so the
    // window fills up behind it and the rename pool is put under pressure
    if (!exc_seen && (final_phase || cycle % 400 >= 50)) begin
      foreach (young[i]) begin
        r = young[i];
        if (nrd < IW && !rec[r].issued && src_ready(r, 0) && src_ready(r, 1) &&
            ($urandom_range(0, 3) != 0)) begin
          for (int k = 0; k < 2; k++) begin
            rd_bank[2*nrd+k] = rec[r].sb[k];
            rd_preg[2*nrd+k] = rec[r].sp[k];
            if (rec[r].sb[k] == BANK_RF2) begin
              n_rd_rf2++;
              if (idx_live_in_rf1(rec[r].sp[k])) n_both_live++;
            end
          end
          rec[r].issued = 1;
          inflight.push_back('{rob: r, seq: rec[r].seq, slot: nrd, cyc: cycle});
          nrd++;
        end
      end
    end

    // results written this cycle reach the register file at the clock edge; a
    // consumer issued in the same cycle would need the bypass network instead
    foreach (wrote[i]) rec[wrote[i]].written = rec[wrote[i]].has_dst;

    // 4. misprediction of a random live entry
    if (!exc_seen && !final_phase && young.size() > 2 && $urandom_range(0, 59) == 0) begin
      // a branch resolves before it completes: pick an unfinished one
      sel = young[$urandom_range(0, young.size() - 2)];
      if (!rec[sel].done) begin
        br_valid = 1;
        br_rob   = RW'(sel);
        n_mispredict++;
      end
    end

    // 5. dispatch a group
    if (allow_dispatch) begin
      for (int i = 0; i < IW; i++) begin
        disp_valid[i]   = ($urandom_range(0, 9) != 0);
        disp_has_dst[i] = ($urandom_range(0, 7) != 0);
        disp_dst[i]     = LW'($urandom_range(0, NLREG - 1));
        disp_src1[i]    = LW'($urandom_range(0, NLREG - 1));
        disp_src2[i]    = LW'($urandom_range(0, NLREG - 1));
      end
    end else if (readback && fin_next < NLREG) begin
      for (int i = 0; i < IW && fin_next + i < NLREG; i++) begin
        disp_valid[i]   = 1;
        disp_has_dst[i] = 0;
        disp_src1[i]    = LW'(fin_next + i);
        disp_src2[i]    = LW'(fin_next + i);
      end
    end
    #1;
    if (stall_noreg) n_stall++;

    // 6. record what the design accepted (program order)
    if (disp_fire) begin
      for (int i = 0; i < IW; i++) begin
        if (!disp_valid[i]) continue;
        r = int'(disp_rob[i]);
        checks++;
        if (r != int'(rob_tail_tb % ROB_N)) begin
          failures++;
          $display("ROB index %0d, expected %0d", r, rob_tail_tb % ROB_N);
        end
        rob_tail_tb = (r + 1) % ROB_N;
        rec[r] = '{default: '0};
        rec[r].live = 1;
        rec[r].seq  = seq_ctr++;
        rec[r].has_dst = disp_has_dst[i];
        rec[r].dst = disp_dst[i];
        rec[r].dpreg = dst_preg[i];
        rec[r].sb[0] = src1_bank[i]; rec[r].sp[0] = src1_preg[i];
        rec[r].sb[1] = src2_bank[i]; rec[r].sp[1] = src2_preg[i];
        rec[r].sval[0] = gold[disp_src1[i]];
        rec[r].sval[1] = gold[disp_src2[i]];
        rec[r].prod_rob[0] = lprod_rob[disp_src1[i]]; rec[r].prod_seq[0] = lprod_seq[disp_src1[i]];
        rec[r].prod_rob[1] = lprod_rob[disp_src2[i]]; rec[r].prod_seq[1] = lprod_seq[disp_src2[i]];
        rec[r].result = f_result(rec[r].sval[0], rec[r].sval[1], rec[r].seq);
        rec[r].exc = !readback && ($urandom_range(0, 399) == 0);
        if (readback) begin
          fin_bank[disp_src1[i]] = src1_bank[i];
          fin_preg[disp_src1[i]] = src1_preg[i];
        end
        if (disp_has_dst[i]) begin
          rec[r].old_gold     = gold[disp_dst[i]];
          rec[r].old_prod_rob = lprod_rob[disp_dst[i]];
          rec[r].old_prod_seq = lprod_seq[disp_dst[i]];
          gold[disp_dst[i]]      = rec[r].result;
          lprod_rob[disp_dst[i]] = r;
          lprod_seq[disp_dst[i]] = rec[r].seq;
        end
        young.push_back(r);
      end
      if (readback) fin_next += IW;
    end

    // 7. misprediction: drop the younger records (after any same-cycle dispatch,
    //    which the design refuses while br_valid is high)
    if (br_valid) begin
      checks++;
      if (disp_fire) begin failures++; $display("dispatch accepted during misprediction"); end
      if (young[$] != int'(br_rob)) begin
        int idx = 0;
        foreach (young[i]) if (young[i] == int'(br_rob)) idx = i;
        squash_from(young[idx + 1]);
      end
    end

    // 8. commits retire the oldest records
    for (int k = 0; k < IW; k++) begin
      if (commit_valid[k]) begin
        checks++;
        r = young.pop_front();
        if (!rec[r].done) begin failures++; if (failures < 5) $display("cycle %0d: entry %0d committed before completion (young %0d, rob_count %0d, mp %0d exc %0d)", cycle, r, young.size(), rob_count, n_mispredict, n_exc); end
        rec[r].live = 0;
        n_commit++;
      end
    end

    // 9. transfer broadcast into the held operand tags
    foreach (young[i]) begin
      r = young[i];
      for (int k = 0; k < 2; k++)
        if (rec[r].sb[k] == BANK_RF1 && xfer_mask[rec[r].sp[k]]) rec[r].sb[k] = BANK_RF2;
    end
    for (int l = 0; l < NLREG; l++)
      if (fin_bank[l] == BANK_RF1 && xfer_mask[fin_preg[l]]) fin_bank[l] = BANK_RF2;
  endtask

  int live1, live2;

  initial begin
    done = 0; checks = 0; failures = 0;
    drive_idle();
    for (int l = 0; l < NLREG; l++) begin
      gold[l] = '0; lprod_rob[l] = -1; lprod_seq[l] = 0;
      fin_bank[l] = BANK_RF2; fin_preg[l] = '0;
    end
    for (int r = 0; r < ROB_N; r++) rec[r] = '{default: '0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int c = 0; c < RUN_CYCLES; c++) one_cycle(1, 0);

    // drain, then read every logical register through the map
    final_phase = 1;
    while (young.size() > 0) one_cycle(0, 0);
    while (fin_next < NLREG) one_cycle(0, 1);
    while (young.size() > 0) one_cycle(0, 0);
    repeat (20) one_cycle(0, 0);

    // accounting: RF1 registers are free or hold a live mapping, RF2 likewise
    live1 = 0; live2 = 0;
    for (int l = 0; l < NLREG; l++) begin
      if (fin_bank[l] == BANK_RF1) live1++; else live2++;
    end
    checks++;
    if (int'(rf1_free_count) + live1 != NPREG) begin
      failures++;
      $display("RF1 accounting: free %0d + live %0d != %0d", rf1_free_count, live1, NPREG);
    end
    checks++;
    if ($countones(rf2_busy) != live2) begin
      failures++;
      $display("RF2 accounting: busy %0d != live %0d", $countones(rf2_busy), live2);
    end
    checks++;
    if (rob_count != 0) begin failures++; $display("ROB not empty at the end"); end

    $display("IW=%0d NPREG=%0d RD_LAT=%0d:", IW, NPREG, RD_LAT);
    $display("cycles=%0d commits=%0d transfers=%0d rf2_reads=%0d both_live_reads=%0d stalls=%0d",
             cycle, n_commit, n_xfer, n_rd_rf2, n_both_live, n_stall);
    $display("commit_free_rf1=%0d commit_free_rf2=%0d squash_free_rf1=%0d squash_free_rf2=%0d mispredicts=%0d exceptions=%0d",
             n_commit_rf1, n_commit_rf2, n_sq_rf1, n_sq_rf2, n_mispredict, n_exc);
    checks += 10;
    if (REQ_STALL) begin
      checks++;
      if (n_stall == 0) begin failures++; $display("no stall on an empty RF1 pool"); end
    end
    if (n_xfer == 0)       begin failures++; $display("no transfer happened"); end
    if (n_rd_rf2 == 0)     begin failures++; $display("no read from RF2"); end
    if (n_both_live == 0)  begin failures++; $display("no index live in both banks"); end
    if (n_commit == 0)     begin failures++; $display("no commit"); end
    if (n_commit_rf1 == 0) begin failures++; $display("no stale RF1 release at commit"); end
    if (n_commit_rf2 == 0) begin failures++; $display("no stale RF2 release at commit"); end
    if (n_sq_rf1 == 0)     begin failures++; $display("no squashed RF1 release"); end
    if (n_sq_rf2 == 0)     begin failures++; $display("no squashed RF2 release"); end
    if (n_mispredict == 0) begin failures++; $display("no misprediction"); end
    if (n_exc == 0)        begin failures++; $display("no exception"); end

    done = 1;
  end

endmodule
