// seed_reg: holds the boot-time session seed of the scrambler.
//
// After reset the register is empty. The first word the random number
// generator presents (rng_valid=1) is captured and then held, unchanged, for
// the rest of the session: the read path must regenerate exactly the
// keystream the write path used, so the seed may not move while the session
// lasts. Later RNG words are ignored. Reset (a new boot) clears the seed and
// arms the capture again, so each boot draws a fresh seed and nothing of the
// old one survives. The seed is never written to any non-volatile place.
//
// Interface / timing: seed and seed_ready are registered; seed_ready rises
// the cycle after the capturing rng_valid. Capturing only the first word and
// clearing on reset are this design's reading of "a boot-time seed from a
// hardware RNG" that stays constant within a session.
module seed_reg #(
  parameter int unsigned N = glfsr_pkg::LFSR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rng_valid,
  input  logic [N-1:0] rng_data,
  output logic [N-1:0] seed,
  output logic         seed_ready
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seed       <= '0;
      seed_ready <= 1'b0;
    end else if (rng_valid && !seed_ready) begin
      seed       <= rng_data;
      seed_ready <= 1'b1;
    end
  end
endmodule
