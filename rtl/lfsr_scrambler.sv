// lfsr_scrambler: one scrambling channel of the memory controller. The same
// module is the write-path scrambler (plaintext in, scrambled data to DRAM)
// and the read-path de-scrambler (scrambled data from DRAM in, plaintext out),
// because both are T' = T ^ K with the same keystream K.
//
// How it works: a transaction request carries the burst's address. The
// channel forms the configuration word P = Address ^ Seed (address
// zero-extended to the LFSR width) and loads a generic_lfsr with it, which
// both seeds the register and fixes its inner feedback taps for the whole
// burst. Each data beat is XORed with the current LFSR state; after every
// beat the LFSR advances, so beat j of the burst uses the (j+1)-th state.
//
// Interface / timing:
//   seed      - boot-time session seed, held constant during a session.
//   req_valid / req_addr - start a burst. Must come at least one cycle before
//               its first beat (in DRAM the CAS / write latency covers this);
//               a new request may arrive on the cycle of the last beat.
//   in_valid / in_data   - data beat to scramble or de-scramble.
//   out_valid / out_data - result, combinational from in_data: the channel
//               adds no clock cycle to the data path.
//   armed     - a burst is loaded and not all BURST_LEN beats have passed.
// A beat that arrives while the channel is not armed violates the protocol
// (checked by an assertion); its data still passes through XORed with the
// current state. Widths, the request/beat handshake and the per-burst reload
// are this design's choices; the P = Address ^ Seed configuration, the
// per-access reload and the XOR data path follow the scheme.
module lfsr_scrambler #(
  parameter int unsigned N         = glfsr_pkg::LFSR_W,
  parameter int unsigned ADDR_W    = glfsr_pkg::ADDR_W,
  parameter int unsigned BURST_LEN = glfsr_pkg::BURST_LEN,
  parameter int unsigned STEPS     = glfsr_pkg::STEPS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      seed,
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              in_valid,
  input  logic [N-1:0]      in_data,
  output logic              out_valid,
  output logic [N-1:0]      out_data,
  output logic              armed
);
  localparam int unsigned CNT_W = $clog2(BURST_LEN + 1);

  logic [N-1:0]     p;
  logic [N-1:0]     key;
  logic [CNT_W-1:0] beats_left_q;

  // Configuration parameter P = Address XOR Seed.
  assign p = N'(req_addr) ^ seed;

  generic_lfsr #(.N(N), .STEPS(STEPS)) u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (req_valid),
    .p       (p),
    .advance (in_valid),
    .state   (key)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      beats_left_q <= '0;
    else if (req_valid)
      beats_left_q <= CNT_W'(BURST_LEN);
    else if (in_valid && beats_left_q != '0)
      beats_left_q <= beats_left_q - 1'b1;
  end

  assign armed     = (beats_left_q != '0);
  assign out_valid = in_valid;
  assign out_data  = in_data ^ key;

  initial begin
    assert (ADDR_W <= N) else $fatal(1, "lfsr_scrambler: ADDR_W must not exceed N");
  end

  // Handshake rule: every beat belongs to a loaded, unfinished burst.
  a_beat_in_burst: assert property (@(posedge clk) disable iff (!rst_n)
                                    in_valid |-> armed)
    else $error("lfsr_scrambler: data beat outside a requested burst");
endmodule
