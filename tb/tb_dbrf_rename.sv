// tb_dbrf_rename: self-checking test of the map table with bank flags.
//
// The reference renames the group one instruction at a time in program order on a
// shadow table (so same-group dependences fall out naturally), after first moving
// every "p in RF1" entry whose p is in this cycle's transfer mask to RF2. It also
// keeps its own copy of the table saved for every reorder buffer entry, moved by
// the same broadcasts. Groups, entry numbers, free-pool offers, transfer masks, ROB
// back-pressure and restores of random, already saved states are all random. Checked every
// cycle: renamed sources, stale mappings, new destinations, the registers taken
// from the pool, the dispatch decision and the no-register stall; restored tables
// are checked through the renamed tags of the following groups.
module tb_dbrf_rename;
  import dbrf_pkg::*;

  localparam int unsigned NLREG = DEF_NLREG, NPREG = DEF_NPREG, W = DEF_IW, ROB_N = DEF_ROB_N;
  localparam int unsigned PW = $clog2(NPREG), LW = $clog2(NLREG), RW = $clog2(ROB_N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0]  disp_valid, disp_has_dst;
  logic [LW-1:0] disp_dst [W], disp_src1 [W], disp_src2 [W];
  logic          rob_ready, disp_fire, stall_noreg;
  bank_e         src1_bank [W], src2_bank [W], stale_bank [W];
  logic [PW-1:0] src1_preg [W], src2_preg [W], dst_preg [W], stale_preg [W];
  logic [W-1:0]  cand_valid, take;
  logic [PW-1:0] cand_idx [W];
  logic [NPREG-1:0] xfer_mask;
  logic [RW-1:0] disp_rob [W];
  logic          restore_valid;
  logic [RW-1:0] restore_rob;

  dbrf_rename dut (.*);

  bank_e         mb [NLREG];
  logic [PW-1:0] mp [NLREG];
  bank_e         cb [ROB_N][NLREG];
  logic [PW-1:0] cp [ROB_N][NLREG];
  bank_e         sb [W][NLREG];
  logic [PW-1:0] sp [W][NLREG];
  bit            cw [ROB_N];
  int robc = 0, n_restore = 0;
  int checks = 0, failures = 0, n_fire = 0, n_stall = 0, n_flag = 0;

  task automatic chk(bit ok, string what, int i);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("slot %0d: %s", i, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank_e         vb [NLREG];
    logic [PW-1:0] vp [NLREG];
    int ncand, k, nneed, nv;
    bit restore, efire;
    for (int l = 0; l < NLREG; l++) begin mb[l] = BANK_RF2; mp[l] = PW'(l); end
    for (int n = 0; n < ROB_N; n++)
      for (int l = 0; l < NLREG; l++) begin cb[n][l] = BANK_RF2; cp[n][l] = PW'(l); end
    disp_valid = '0; disp_has_dst = '0; rob_ready = 0; cand_valid = '0; xfer_mask = '0;
    restore_valid = 0; restore_rob = '0;
    for (int i = 0; i < W; i++) begin
      disp_dst[i] = '0; disp_src1[i] = '0; disp_src2[i] = '0; cand_idx[i] = '0; disp_rob[i] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      restore   = ($urandom_range(0, 9) == 0);
      ncand = $urandom_range(0, 3) == 0 ? $urandom_range(0, W) : W;
      cand_valid = '0;
      for (int i = 0; i < W; i++) begin
        cand_valid[i] = (i < ncand);
        cand_idx[i]   = PW'($urandom_range(0, NPREG - 1));
        disp_valid[i]   = $urandom_range(0, 7) != 0;
        disp_has_dst[i] = $urandom_range(0, 5) != 0;
        disp_dst[i]  = LW'($urandom_range(0, NLREG - 1));
        disp_src1[i] = LW'($urandom_range(0, NLREG - 1));
        disp_src2[i] = LW'($urandom_range(0, NLREG - 1));
      end
      // restore only entries whose copy has been taken
      restore_rob = RW'($urandom_range(0, ROB_N - 1));
      if (!cw[restore_rob]) restore = 0;
      restore_valid = restore;
      rob_ready = !restore && ($urandom_range(0, 5) != 0);
      nv = 0;
      for (int i = 0; i < W; i++) begin
        disp_rob[i] = RW'(robc + nv);
        if (disp_valid[i]) nv++;
      end
      for (int p = 0; p < NPREG; p++) xfer_mask[p] = ($urandom_range(0, 7) == 0);
      #1;
      // reference: broadcast first, then program-order renaming
      for (int l = 0; l < NLREG; l++) begin
        vb[l] = (mb[l] == BANK_RF1 && xfer_mask[mp[l]]) ? BANK_RF2 : mb[l];
        vp[l] = mp[l];
        if (mb[l] == BANK_RF1 && xfer_mask[mp[l]]) n_flag++;
      end
      nneed = 0;
      for (int i = 0; i < W; i++) if (disp_valid[i] && disp_has_dst[i]) nneed++;
      efire = rob_ready && (disp_valid != '0) && (nneed <= ncand);
      chk(disp_fire == efire, "dispatch decision", 0);
      chk(stall_noreg == (rob_ready && (disp_valid != '0) && nneed > ncand), "stall flag", 0);
      k = 0;
      for (int i = 0; i < W; i++) begin
        if (!disp_valid[i] || !efire) continue;
        sb[i] = vb;
        sp[i] = vp;
        chk(src1_bank[i] == vb[disp_src1[i]] && src1_preg[i] == vp[disp_src1[i]], "src1 tag", i);
        chk(src2_bank[i] == vb[disp_src2[i]] && src2_preg[i] == vp[disp_src2[i]], "src2 tag", i);
        chk(stale_bank[i] == vb[disp_dst[i]] && stale_preg[i] == vp[disp_dst[i]], "stale tag", i);
        if (disp_has_dst[i] && k < ncand) begin
          chk(dst_preg[i] == cand_idx[k], "destination", i);
          vb[disp_dst[i]] = BANK_RF1;
          vp[disp_dst[i]] = cand_idx[k];
          k++;
        end
      end
      for (int i = 0; i < W; i++) chk(take[i] == (efire && i < nneed), "take", i);
      if (efire) n_fire++;
      if (restore) n_restore++;
      if (stall_noreg) n_stall++;
      @(posedge clk);
      if (restore) begin
        for (int l = 0; l < NLREG; l++) begin
          mb[l] = (cb[restore_rob][l] == BANK_RF1 && xfer_mask[cp[restore_rob][l]]) ? BANK_RF2 : cb[restore_rob][l];
          mp[l] = cp[restore_rob][l];
        end
      end else begin
        for (int l = 0; l < NLREG; l++) begin
          if (efire) begin mb[l] = vb[l]; mp[l] = vp[l]; end
          else mb[l] = (mb[l] == BANK_RF1 && xfer_mask[mp[l]]) ? BANK_RF2 : mb[l];
        end
      end
      for (int n = 0; n < ROB_N; n++)
        for (int l = 0; l < NLREG; l++)
          if (cb[n][l] == BANK_RF1 && xfer_mask[cp[n][l]]) cb[n][l] = BANK_RF2;
      if (efire) begin
        for (int i = 0; i < W; i++)
          if (disp_valid[i]) begin
            cb[disp_rob[i]] = sb[i]; cp[disp_rob[i]] = sp[i]; cw[disp_rob[i]] = 1;
          end
        robc += nv;
      end
    end
    $display("fires=%0d stalls=%0d flag_updates=%0d restores=%0d", n_fire, n_stall, n_flag, n_restore);
    checks++;
    if (n_fire == 0 || n_stall == 0 || n_flag == 0 || n_restore == 0) begin failures++; $display("a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
