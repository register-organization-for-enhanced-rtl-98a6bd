// tb_dbrf_free_list: self-checking test of the RF1 free pool.
//
// A shadow set of free registers is kept by the testbench. Each cycle the offered
// candidates must be the lowest free registers in order, the count must match, a
// random prefix of the offer is taken and random allocated registers are returned.
// The pool must also drain completely and report zero.
module tb_dbrf_free_list;
  import dbrf_pkg::*;

  localparam int unsigned NPREG = DEF_NPREG, W = DEF_IW;
  localparam int unsigned PW = $clog2(NPREG);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0]     cand_valid, take;
  logic [PW-1:0]    cand_idx [W];
  logic [NPREG-1:0] free_mask;
  logic [$clog2(NPREG+1)-1:0] free_count;

  dbrf_free_list dut (.*);

  logic [NPREG-1:0] mfree;
  int checks = 0, failures = 0, empty_seen = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ntake, ret_rate;
    int exp_idx [W];
    take = '0; free_mask = '0;
    mfree = '1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      ret_rate = (c % 400 < 200) ? 12 : 2;   // alternate draining and refilling
      n = 0;
      for (int p = 0; p < NPREG; p++) begin
        if (mfree[p] && n < W) begin
          checks++;
          exp_idx[n] = p;
          if (!cand_valid[n] || cand_idx[n] != PW'(p)) begin
            failures++; $display("offer %0d: expected %0d", n, p);
          end
          n++;
        end
      end
      for (int k = n; k < W; k++) begin
        checks++;
        if (cand_valid[k]) begin failures++; $display("offer %0d should be empty", k); end
      end
      checks++;
      if (free_count != $countones(mfree)) begin failures++; $display("count mismatch"); end
      if (free_count == 0) empty_seen++;
      ntake = $urandom_range(0, n);
      take = '0;
      for (int k = 0; k < ntake; k++) take[k] = 1'b1;
      free_mask = '0;
      for (int p = 0; p < NPREG; p++)
        if (!mfree[p] && $urandom_range(0, ret_rate) == 0) free_mask[p] = 1'b1;
      @(posedge clk);
      for (int k = 0; k < ntake; k++) mfree[exp_idx[k]] = 1'b0;
      mfree = mfree | free_mask;
    end
    checks++;
    if (empty_seen == 0) begin failures++; $display("pool never ran empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
