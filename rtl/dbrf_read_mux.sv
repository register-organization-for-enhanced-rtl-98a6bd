// dbrf_read_mux: operand selection between the two banks, plus the bank access latency.
//
// Each operand read port presents a register index to both banks at once together
// with the bank flag of its mapping. The flag picks RF1's or RF2's word, which is
// the multiplexer between the banks in front of the functional units. Because the
// two banks are direct mapped, one index serves both; the flag alone decides which
// generation of register p the reader gets.
//
// The selected word is delayed by RD_LAT register stages, so data appears RD_LAT
// cycles after the index and flag are presented: one cycle in the main
// configuration (both banks single-cycle), two in the larger one (two-cycle banks).
// The pipeline registers are this design's way of modelling that access time.
module dbrf_read_mux
  import dbrf_pkg::*;
#(
  parameter int unsigned NRD    = 2 * DEF_IW,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned RD_LAT = DEF_RD_LAT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bank_e               rd_bank  [NRD],
  input  logic [DATA_W-1:0]   rf1_data [NRD],
  input  logic [DATA_W-1:0]   rf2_data [NRD],
  output logic [DATA_W-1:0]   rd_data  [NRD]
);

  logic [DATA_W-1:0] sel  [NRD];
  logic [DATA_W-1:0] pipe [RD_LAT][NRD];

  always_comb begin
    for (int r = 0; r < NRD; r++)
      sel[r] = (rd_bank[r] == BANK_RF2) ? rf2_data[r] : rf1_data[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < RD_LAT; s++)
        for (int r = 0; r < NRD; r++) pipe[s][r] <= '0;
    end else begin
      for (int r = 0; r < NRD; r++) pipe[0][r] <= sel[r];
      for (int s = 1; s < RD_LAT; s++)
        for (int r = 0; r < NRD; r++) pipe[s][r] <= pipe[s-1][r];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = pipe[RD_LAT-1][r];
  end

endmodule
