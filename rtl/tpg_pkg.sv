// tpg_pkg: types and constants shared by the low-power test pattern generator
// (reconfigurable Johnson counter + accumulator) and the BIST around it.
//
// The mode encoding of the reconfigurable Johnson counter follows the
// published waveforms: 00 initialization, 10 normal Johnson counting,
// 01 circular shift. Code 11 is not defined there; this design uses it to
// hold the counter.
package tpg_pkg;

  // Width of the Johnson counter and of every test pattern (8-bit counter).
  localparam int unsigned PAT_W = 8;

  // Number of patterns applied in one BIST run (test length 12).
  localparam int unsigned TEST_LENGTH = 12;

  // Width of the fault code that selects the injected stuck-at fault.
  localparam int unsigned FAULT_W = 6;

  typedef enum logic [1:0] {
    RJC_INIT   = 2'b00,  // clear the counter
    RJC_CSHIFT = 2'b01,  // rotate: J0 <- J(l-1), Jk <- J(k-1)
    RJC_NORMAL = 2'b10,  // Johnson: J0 <- ~J(l-1), Jk <- J(k-1)
    RJC_HOLD   = 2'b11   // keep the current vector
  } rjc_mode_e;

endpackage
