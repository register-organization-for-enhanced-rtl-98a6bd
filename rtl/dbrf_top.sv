// dbrf_top: dual bank register file subsystem of an out-of-order core.
//
// The physical registers are split into two equally sized, direct-mapped banks.
// RF1 is the bank the renamer allocates from and the functional units write into.
// As soon as a register in RF1 holds its value and the register with the same index
// in RF2 is free, the value is copied to RF2 over one of IW transfer buses and the
// RF1 register goes back to the rename pool. RF2 keeps the value until the mapping
// dies, i.e. until the next writer of the same logical register commits. The
// renamer therefore sees RF1 registers come free long before a conventional
// register file would release them, while each bank stays small and fast.
//
// Because a transferred index can be reallocated in RF1 while the older value still
// sits in RF2, every register name carries a bank flag. The map table, the reorder
// buffer and (outside this module) the issue queue change "p in RF1" to "p in RF2"
// when xfer_mask shows p moving; the operand mux uses the flag to choose the bank.
//
// Blocks: dbrf_rename (map table with flags), dbrf_free_list (RF1 pool),
// dbrf_rf1/dbrf_rf2 (banks), dbrf_xfer (transfer selection), dbrf_read_mux
// (operand select and access latency), dbrf_rob (retire, squash).
//
// Interface, all per clock:
//   dispatch  disp_* group of up to IW instructions; disp_fire says it was taken
//             (stall_noreg: held because RF1 had too few free registers). Renamed
//             source tags, destination RF1 register and ROB index come back
//             combinationally in the same cycle.
//   read      rd_bank/rd_preg on 2*IW ports; rd_data follows RD_LAT cycles later.
//   writeback wb_* writes results into RF1 (IW ports).
//   complete  cpl_* marks ROB entries done, optionally with an exception.
//   branch    br_valid/br_rob squashes everything younger than br_rob; the
//             squash (also on an exception) completes at the next edge, and
//             squash_valid marks the cycle in which it is applied.
//   broadcast xfer_mask must be applied by the issue queue to the operand tags it
//             holds, in the same cycle; exc_valid/exc_rob report a taken exception.
// The issue queue, functional units and bypass network are outside this module;
// they may still write back an instruction in the cycle of its squash, but not later.
module dbrf_top
  import dbrf_pkg::*;
#(
  parameter int unsigned IW     = DEF_IW,
  parameter int unsigned NPREG  = DEF_NPREG,
  parameter int unsigned NLREG  = DEF_NLREG,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned ROB_N  = DEF_ROB_N,
  parameter int unsigned RD_LAT = DEF_RD_LAT,
  localparam int unsigned NRD   = 2 * IW,
  localparam int unsigned PW    = $clog2(NPREG),
  localparam int unsigned LW    = $clog2(NLREG),
  localparam int unsigned RW    = $clog2(ROB_N),
  localparam int unsigned CW    = $clog2(ROB_N + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic [IW-1:0]      disp_valid,
  input  logic [IW-1:0]      disp_has_dst,
  input  logic [LW-1:0]      disp_dst  [IW],
  input  logic [LW-1:0]      disp_src1 [IW],
  input  logic [LW-1:0]      disp_src2 [IW],
  output logic               disp_fire,
  output logic               stall_noreg,
  output bank_e              src1_bank [IW],
  output logic [PW-1:0]      src1_preg [IW],
  output bank_e              src2_bank [IW],
  output logic [PW-1:0]      src2_preg [IW],
  output logic [PW-1:0]      dst_preg  [IW],
  output logic [RW-1:0]      disp_rob  [IW],
  // operand reads
  input  bank_e              rd_bank [NRD],
  input  logic [PW-1:0]      rd_preg [NRD],
  output logic [DATA_W-1:0]  rd_data [NRD],
  // writeback into RF1
  input  logic [IW-1:0]      wb_valid,
  input  logic [PW-1:0]      wb_preg [IW],
  input  logic [DATA_W-1:0]  wb_data [IW],
  // completion
  input  logic [IW-1:0]      cpl_valid,
  input  logic [RW-1:0]      cpl_rob [IW],
  input  logic [IW-1:0]      cpl_exc,
  // branch misprediction
  input  logic               br_valid,
  input  logic [RW-1:0]      br_rob,
  // status and broadcasts
  output logic [NPREG-1:0]   xfer_mask,
  output logic [IW-1:0]      commit_valid,
  output logic               exc_valid,
  output logic [RW-1:0]      exc_rob,
  output logic               squash_valid,
  output logic [CW-1:0]      rob_count,
  output logic [$clog2(NPREG+1)-1:0] rf1_free_count,
  output logic [NPREG-1:0]   rf2_busy
);

  // free pool <-> rename
  logic [IW-1:0]  cand_valid, take;
  logic [PW-1:0]  cand_idx [IW];
  // rename <-> rob
  logic           rob_ready;
  bank_e          stale_bank [IW];
  logic [PW-1:0]  stale_preg [IW];
  logic [RW-1:0]  restore_rob;
  // release masks
  logic [NPREG-1:0] rob_rf1_free, rob_rf2_free;
  logic [NPREG-1:0] rf1_free_all;
  // transfer buses
  logic [NPREG-1:0] rf1_written;
  logic [IW-1:0]    xfer_valid;
  logic [PW-1:0]    xfer_idx  [IW];
  logic [DATA_W-1:0] xfer_data [IW];
  // bank read data
  logic [DATA_W-1:0] rf1_rd [NRD];
  logic [DATA_W-1:0] rf2_rd [NRD];

  assign rf1_free_all = rob_rf1_free | xfer_mask;

  dbrf_rename #(.NLREG(NLREG), .NPREG(NPREG), .W(IW), .ROB_N(ROB_N)) u_rename (
    .clk, .rst_n,
    .disp_valid, .disp_has_dst, .disp_dst, .disp_src1, .disp_src2, .disp_rob,
    .rob_ready, .disp_fire, .stall_noreg,
    .src1_bank, .src1_preg, .src2_bank, .src2_preg, .dst_preg,
    .stale_bank, .stale_preg,
    .cand_valid, .cand_idx, .take,
    .xfer_mask,
    .restore_valid(squash_valid), .restore_rob
  );

  dbrf_free_list #(.NPREG(NPREG), .W(IW)) u_free (
    .clk, .rst_n,
    .cand_valid, .cand_idx, .take,
    .free_mask(rf1_free_all),
    .free_count(rf1_free_count)
  );

  dbrf_rob #(.ROB_N(ROB_N), .W(IW), .NPREG(NPREG)) u_rob (
    .clk, .rst_n,
    .enq_ready(rob_ready), .enq_fire(disp_fire), .enq_valid(disp_valid),
    .enq_has_dst(disp_has_dst), .enq_dst_preg(dst_preg),
    .enq_stale_bank(stale_bank), .enq_stale_preg(stale_preg), .enq_rob(disp_rob),
    .cpl_valid, .cpl_rob, .cpl_exc,
    .br_valid, .br_rob,
    .xfer_mask,
    .rf1_free(rob_rf1_free), .rf2_free(rob_rf2_free),
    .restore_valid(squash_valid), .restore_rob,
    .commit_valid, .exc_valid, .exc_rob, .count(rob_count)
  );

  dbrf_xfer #(.NPREG(NPREG), .NBUS(IW)) u_xfer (
    .rf1_written, .rf2_busy,
    .block_mask(rob_rf1_free),
    .xfer_valid, .xfer_idx, .xfer_mask
  );

  dbrf_rf1 #(.NPREG(NPREG), .DATA_W(DATA_W), .NRD(NRD), .NWR(IW), .NBUS(IW)) u_rf1 (
    .clk, .rst_n,
    .wr_en(wb_valid), .wr_idx(wb_preg), .wr_data(wb_data),
    .free_mask(rf1_free_all),
    .rd_idx(rd_preg), .rd_data(rf1_rd),
    .xfer_idx, .xfer_data,
    .written(rf1_written)
  );

  dbrf_rf2 #(.NPREG(NPREG), .DATA_W(DATA_W), .NRD(NRD), .NBUS(IW), .INIT_BUSY(NLREG)) u_rf2 (
    .clk, .rst_n,
    .xfer_valid, .xfer_idx, .xfer_data,
    .free_mask(rob_rf2_free),
    .rd_idx(rd_preg), .rd_data(rf2_rd),
    .busy(rf2_busy)
  );

  dbrf_read_mux #(.NRD(NRD), .DATA_W(DATA_W), .RD_LAT(RD_LAT)) u_mux (
    .clk, .rst_n,
    .rd_bank, .rf1_data(rf1_rd), .rf2_data(rf2_rd),
    .rd_data
  );

endmodule
