// tb_dbrf_rf2: self-checking test of the RF2 bank.
//
// Checks the reset state (the first NLREG registers busy and zero), then drives
// random transfers into free registers and random releases of busy ones, reading
// every operand port each cycle. A shadow array and shadow busy bits give the
// expected values.
module tb_dbrf_rf2;
  import dbrf_pkg::*;

  localparam int unsigned NPREG = DEF_NPREG, DATA_W = DEF_DATA_W;
  localparam int unsigned NRD = 2 * DEF_IW, NBUS = DEF_IW;
  localparam int unsigned PW = $clog2(NPREG);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NBUS-1:0]   xfer_valid;
  logic [PW-1:0]     xfer_idx [NBUS];
  logic [DATA_W-1:0] xfer_data [NBUS];
  logic [NPREG-1:0]  free_mask;
  logic [PW-1:0]     rd_idx [NRD];
  logic [DATA_W-1:0] rd_data [NRD];
  logic [NPREG-1:0]  busy;

  dbrf_rf2 dut (.*);

  logic [DATA_W-1:0] model [NPREG];
  logic [NPREG-1:0]  mbusy;
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPREG-1:0] used;
    int p;
    xfer_valid = '0; free_mask = '0;
    for (int i = 0; i < NBUS; i++) begin xfer_idx[i] = '0; xfer_data[i] = '0; end
    for (int i = 0; i < NRD; i++) rd_idx[i] = '0;
    for (int i = 0; i < NPREG; i++) begin model[i] = '0; mbusy[i] = (i < DEF_NLREG); end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (busy !== mbusy) begin failures++; $display("busy %h expected %h", busy, mbusy); end
      for (int i = 0; i < NRD; i++) rd_idx[i] = PW'($urandom_range(0, NPREG - 1));
      #1;
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (rd_data[i] !== model[rd_idx[i]]) begin failures++; $display("rd port %0d mismatch", i); end
      end
      free_mask = '0;
      for (int q = 0; q < NPREG; q++)
        if (mbusy[q] && $urandom_range(0, 4) == 0) free_mask[q] = 1'b1;
      used = mbusy;
      for (int i = 0; i < NBUS; i++) begin
        p = $urandom_range(0, NPREG - 1);
        xfer_valid[i] = 0;
        if (!used[p]) begin
          used[p]       = 1'b1;
          xfer_valid[i] = 1;
          xfer_idx[i]   = PW'(p);
          xfer_data[i]  = {$urandom, $urandom};
        end
      end
      @(posedge clk);
      mbusy = mbusy & ~free_mask;
      for (int i = 0; i < NBUS; i++) if (xfer_valid[i]) begin
        model[xfer_idx[i]] = xfer_data[i];
        mbusy[xfer_idx[i]] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
