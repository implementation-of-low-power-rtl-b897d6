// presto_pkg: types and constants shared by the blocks of the PRESTO
// (preselected toggling) low-power pseudorandom pattern generator.
//
// A 4-bit code selects a weighted probability in three places: the
// Switching register (fraction of hold latches left in toggle mode), and
// the Hold and Toggle registers (how long the whole generator stays in a
// hold or toggle period). Code bit 3 enables the p=1/2 AND gate, bit 2 the
// p=1/4 gate, bit 1 the p=1/8 gate and bit 0 the p=1/16 gate, so code 0100
// asks for 1/4. The number of PRPG bits each weighted logic consumes
// (1+2+3+4 = 10) is WL_BITS.
package presto_pkg;

  typedef logic [3:0] code_t;

  // Number of pseudorandom bits one weighted logic block needs.
  localparam int unsigned WL_BITS = 10;

  // Mode of the whole generator, held in the T flip-flop.
  typedef enum logic {
    MODE_HOLD   = 1'b0,
    MODE_TOGGLE = 1'b1
  } mode_e;

  // Programmable controls of the generator.
  typedef struct packed {
    code_t switching;  // fraction of latches in toggle mode; 0000 = low power off
    code_t hold;       // weight that ends a hold period
    code_t toggle;     // weight that ends a toggle period
  } presto_cfg_t;

endpackage
