// glfsr_pkg: constants shared by the generic-LFSR memory scrambler.
//
// The scrambler XORs every data beat on the DRAM bus with a keystream word
// produced by a "generic" LFSR whose internal feedback taps are set, per
// memory transaction, by P = Address XOR Seed. This package holds the default
// sizes used throughout the design:
//   * LFSR_W  - LFSR width, equal to the data-bus width, so one LFSR state is
//               the key for one beat. 64 bits (a DDR3 DIMM data bus) is this
//               design's choice; the scheme itself is width-generic.
//   * ADDR_W  - width of the transaction address folded into P (design choice).
//   * BURST_LEN - beats per transaction; DDR3 uses a fixed burst of 8 (BL8).
//   * STEPS   - LFSR steps taken between two consecutive keystream words.
//               The default, LFSR_W, makes the keystream the LFSR's serial
//               one-bit-per-step output (8K steps for a K-byte burst), with
//               the N bits of the initial load shifted out first, so no beat
//               is XORed with Address ^ Seed itself. STEPS = 1 gives the
//               scheme's small worked example, where consecutive keystream
//               words are consecutive LFSR states; it is cheaper but the
//               cross-session difference of the first beats then hardly
//               depends on the address (see the README).
package glfsr_pkg;
  localparam int unsigned LFSR_W    = 64;
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned BURST_LEN = 8;
  localparam int unsigned STEPS     = LFSR_W;
endpackage
