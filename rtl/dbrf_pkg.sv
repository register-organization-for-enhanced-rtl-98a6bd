// dbrf_pkg: shared constants and types of the dual bank register file.
//
// A physical register is named by an index (0..NPREG-1) plus a bank flag. RF1 and
// RF2 have the same number of registers and are direct mapped: register p of RF1
// only ever moves into register p of RF2. The bank flag says which of the two copies
// a given logical-to-physical mapping currently lives in.
//
// The default sizes are those of the main evaluated configuration (C3, 8-wide issue):
// 64 registers in each bank, 2*IW read ports per bank, IW write ports into RF1 and IW
// transfer buses from RF1 to RF2. The 128-entry reorder buffer comes from the
// simulated processor. 32 logical registers and 64-bit values follow the Alpha
// instruction set that processor runs; the document does not print those two numbers.
package dbrf_pkg;

  // Bank flag carried with every physical register name.
  typedef enum logic {
    BANK_RF1 = 1'b0,
    BANK_RF2 = 1'b1
  } bank_e;

  localparam int unsigned DEF_IW     = 8;    // issue width (Table 2, IW = 8)
  localparam int unsigned DEF_NPREG  = 64;   // registers per bank (C3)
  localparam int unsigned DEF_NLREG  = 32;   // logical registers (Alpha ISA)
  localparam int unsigned DEF_DATA_W = 64;   // register width (Alpha ISA)
  localparam int unsigned DEF_ROB_N  = 128;  // reorder buffer entries (Table 1)
  localparam int unsigned DEF_RD_LAT = 1;    // bank access latency in cycles (C3)

endpackage
