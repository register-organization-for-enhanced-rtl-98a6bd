// tb_dbrf_rf1: self-checking test of the RF1 bank.
//
// Random writeback traffic on all write ports (distinct registers per cycle),
// random releases of written registers, occasional writes to a register in the
// cycle it is released (a squashed instruction writing back; the release must win),
// and random reads on every operand and transfer read port. A shadow array and
// shadow "written" bits, updated by the testbench's own rules, give the expected
// read data and status every cycle; data written into a register as it is released
// is don't-care until the register is written again.
module tb_dbrf_rf1;
  import dbrf_pkg::*;

  localparam int unsigned NPREG = DEF_NPREG, DATA_W = DEF_DATA_W;
  localparam int unsigned NRD = 2 * DEF_IW, NWR = DEF_IW, NBUS = DEF_IW;
  localparam int unsigned PW = $clog2(NPREG);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NWR-1:0]    wr_en;
  logic [PW-1:0]     wr_idx [NWR];
  logic [DATA_W-1:0] wr_data [NWR];
  logic [NPREG-1:0]  free_mask;
  logic [PW-1:0]     rd_idx [NRD];
  logic [DATA_W-1:0] rd_data [NRD];
  logic [PW-1:0]     xfer_idx [NBUS];
  logic [DATA_W-1:0] xfer_data [NBUS];
  logic [NPREG-1:0]  written;

  dbrf_rf1 dut (.*);

  logic [DATA_W-1:0] model [NPREG];
  logic [NPREG-1:0]  mwritten;
  logic [NPREG-1:0]  dc;
  int checks = 0, failures = 0, n_clash = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPREG-1:0] used;
    int p;
    wr_en = '0; free_mask = '0;
    for (int i = 0; i < NWR; i++) begin wr_idx[i] = '0; wr_data[i] = '0; end
    for (int i = 0; i < NRD; i++) rd_idx[i] = '0;
    for (int i = 0; i < NBUS; i++) xfer_idx[i] = '0;
    for (int i = 0; i < NPREG; i++) model[i] = '0;
    mwritten = '0;
    dc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // compare everything against the model
      checks++;
      if (written !== mwritten) begin failures++; $display("written %h expected %h", written, mwritten); end
      for (int i = 0; i < NRD; i++) begin
        rd_idx[i] = PW'($urandom_range(0, NPREG - 1));
      end
      for (int i = 0; i < NBUS; i++) xfer_idx[i] = PW'($urandom_range(0, NPREG - 1));
      #1;
      for (int i = 0; i < NRD; i++) begin
        if (dc[rd_idx[i]]) continue;
        checks++;
        if (rd_data[i] !== model[rd_idx[i]]) begin failures++; $display("rd port %0d mismatch", i); end
      end
      for (int i = 0; i < NBUS; i++) begin
        if (dc[xfer_idx[i]]) continue;
        checks++;
        if (xfer_data[i] !== model[xfer_idx[i]]) begin failures++; $display("xfer port %0d mismatch", i); end
      end
      // new stimulus: releases of written registers, writes to others
      free_mask = '0;
      for (int q = 0; q < NPREG; q++)
        if (mwritten[q] && $urandom_range(0, 5) == 0) free_mask[q] = 1'b1;
      used = free_mask;
      for (int i = 0; i < NWR; i++) begin
        p = $urandom_range(0, NPREG - 1);
        wr_en[i] = 0;
        if (free_mask[p] && $urandom_range(0, 3) == 0) used[p] = 1'b0;
        if (!used[p] && $urandom_range(0, 2) != 0) begin
          used[p]    = 1'b1;
          wr_en[i]   = 1;
          wr_idx[i]  = PW'(p);
          wr_data[i] = {$urandom, $urandom};
        end
      end
      @(posedge clk);
      for (int i = 0; i < NWR; i++) if (wr_en[i]) begin
        model[wr_idx[i]] = wr_data[i];
        mwritten[wr_idx[i]] = 1'b1;
        dc[wr_idx[i]] = free_mask[wr_idx[i]];
        if (free_mask[wr_idx[i]]) n_clash++;
      end
      mwritten = mwritten & ~free_mask;
    end
    $display("write-and-release cycles=%0d", n_clash);
    checks++;
    if (n_clash == 0) begin failures++; $display("write-and-release never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
