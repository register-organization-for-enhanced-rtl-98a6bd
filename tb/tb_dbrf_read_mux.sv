// tb_dbrf_read_mux: self-checking test of the operand bank mux.
//
// Two instances: the single-cycle configuration (default) and a two-cycle one.
// Every cycle each port gets a random bank flag and random words from both banks;
// the testbench checks that the word chosen by the flag comes out exactly RD_LAT
// cycles later.
module tb_dbrf_read_mux;
  import dbrf_pkg::*;

  localparam int unsigned NRD = 2 * DEF_IW, DATA_W = DEF_DATA_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bank_e             rd_bank  [NRD];
  logic [DATA_W-1:0] rf1_data [NRD];
  logic [DATA_W-1:0] rf2_data [NRD];
  logic [DATA_W-1:0] out1 [NRD];
  logic [DATA_W-1:0] out2 [NRD];

  dbrf_read_mux dut1 (.clk, .rst_n, .rd_bank, .rf1_data, .rf2_data, .rd_data(out1));
  dbrf_read_mux #(.RD_LAT(2)) dut2 (.clk, .rst_n, .rd_bank, .rf1_data, .rf2_data, .rd_data(out2));

  logic [DATA_W-1:0] hist [3][NRD];   // expected words of the last three cycles
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NRD; r++) begin
      rd_bank[r] = BANK_RF1; rf1_data[r] = '0; rf2_data[r] = '0;
      for (int h = 0; h < 3; h++) hist[h][r] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        for (int r = 0; r < NRD; r++) begin
          checks += 2;
          if (out1[r] !== hist[0][r]) begin failures++; $display("1-cycle port %0d mismatch", r); end
          if (out2[r] !== hist[1][r]) begin failures++; $display("2-cycle port %0d mismatch", r); end
        end
      end
      for (int r = 0; r < NRD; r++) begin
        rd_bank[r]  = $urandom_range(0, 1) ? BANK_RF2 : BANK_RF1;
        rf1_data[r] = {$urandom, $urandom};
        rf2_data[r] = {$urandom, $urandom};
        hist[2][r]  = hist[1][r];
        hist[1][r]  = hist[0][r];
        hist[0][r]  = (rd_bank[r] == BANK_RF2) ? rf2_data[r] : rf1_data[r];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
