// generic_lfsr: N-bit Fibonacci LFSR whose internal feedback taps are chosen
// at load time by a configuration word P.
//
// State bits are x[N-1] (left, where feedback enters) down to x[0] (right).
// Each step shifts the register one place right (x[i] <= x[i+1]) and writes
// the feedback bit into x[N-1]:
//     F = x[0] ^ (a[1]&x[1]) ^ ... ^ (a[N-2]&x[N-2]) ^ x[N-1]
// The two boundary taps x[0] and x[N-1] are always present; the N-2 inner
// coefficients come from P: a[i] = P[i-1]. This is the generic LFSR of the
// scheme (fixed end taps, AND-gated inner taps); the mapping a[i] = P[i-1]
// follows the AND-gate labels of the schematic and reproduces the scheme's
// worked 6-bit keystream example bit for bit.
//
// Interface / timing:
//   load    - on a clock edge with load=1 the tap coefficients are latched
//             from p, and the state becomes p advanced by STEPS steps (the
//             register is seeded with P itself, as in the worked example).
//   advance - on a clock edge with advance=1 (and load=0) the state moves on
//             by STEPS steps using the latched taps.
//   state   - registered current state; it is the keystream word, valid the
//             cycle after load and after every advance.
// STEPS>1 unrolls the step function so several LFSR clocks happen in one
// system clock (a design choice that keeps the keystream at bus rate).
// A synchronous active-low reset clears state and taps (design choice).
// Note: if P is all zero the state stays zero and the keystream is zero; the
// scheme defines this case ("Address = Seed") and this design keeps it.
module generic_lfsr #(
  parameter int unsigned N     = glfsr_pkg::LFSR_W,
  parameter int unsigned STEPS = glfsr_pkg::STEPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] p,
  input  logic         advance,
  output logic [N-1:0] state
);
  // Only N-2 inner coefficients are programmable.
  logic [N-3:0] taps_q;
  logic [N-1:0] state_q;

  // One LFSR step with inner coefficients a[i] = t[i-1].
  function automatic logic [N-1:0] lfsr_step(input logic [N-1:0] s,
                                             input logic [N-3:0] t);
    logic fb;
    fb = s[0] ^ s[N-1] ^ (^(s[N-2:1] & t));
    return {fb, s[N-1:1]};
  endfunction

  function automatic logic [N-1:0] lfsr_steps(input logic [N-1:0] s,
                                              input logic [N-3:0] t);
    logic [N-1:0] r;
    r = s;
    for (int unsigned k = 0; k < STEPS; k++) r = lfsr_step(r, t);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps_q  <= '0;
      state_q <= '0;
    end else if (load) begin
      taps_q  <= p[N-3:0];
      state_q <= lfsr_steps(p, p[N-3:0]);
    end else if (advance) begin
      state_q <= lfsr_steps(state_q, taps_q);
    end
  end

  assign state = state_q;

  initial begin
    assert (N >= 3) else $fatal(1, "generic_lfsr: N must be at least 3");
    assert (STEPS >= 1) else $fatal(1, "generic_lfsr: STEPS must be at least 1");
  end
endmodule
