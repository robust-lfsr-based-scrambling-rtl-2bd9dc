// tb_cycle_length: cycle length of the generic LFSR for random tap
// configurations (most of which are not primitive polynomials).
//
// For LFSR sizes 16 and 20 bits, random configuration words P are loaded; the
// LFSR is then clocked until its state returns to the state it had right
// after loading, and the number of steps is the cycle length. The fixed x0
// tap makes the step function invertible, so every state lies on a cycle and
// the loop always ends. A reference model in this file steps alongside and
// must agree at every step. Reported: average and maximum cycle length per
// size, against the maximum 2^N - 1. Checked: every length is at most
// 2^N - 1, and the average lies between 2^(N-5) and 2^N - 1 (reference
// averages from the literature on this scheme are near 2^(N-3)).
module tb_cycle_length;
  localparam int CONF16 = 100, CONF20 = 12;
  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic ld16, adv16, ld20, adv20;
  logic [15:0] p16, st16;
  logic [19:0] p20, st20;
  generic_lfsr #(.N(16), .STEPS(1)) u16 (.clk, .rst_n, .load(ld16), .p(p16), .advance(adv16), .state(st16));
  generic_lfsr #(.N(20), .STEPS(1)) u20 (.clk, .rst_n, .load(ld20), .p(p20), .advance(adv20), .state(st20));

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_step(logic [31:0] s, logic [31:0] p, int n);
    logic fb;
    fb = s[0] ^ s[n-1];
    for (int i = 1; i <= n - 2; i++) if (p[i-1]) fb = fb ^ s[i];
    s = s >> 1;
    s[n-1] = fb;
    return s;
  endfunction

  task automatic measure(int n, int confs);
    longint total = 0, maxlen = 0, len;
    int mism;
    logic [31:0] start, r, p;
    for (int c = 0; c < confs; c++) begin
      do p = $urandom & ((32'd1 << n) - 1); while (p == 0);
      @(negedge clk);
      if (n == 16) begin ld16 = 1'b1; p16 = p[15:0]; end
      else         begin ld20 = 1'b1; p20 = p[19:0]; end
      @(negedge clk);
      ld16 = 1'b0; ld20 = 1'b0;
      start = (n == 16) ? 32'(st16) : 32'(st20);
      r = ref_step(p, p, n);
      mism = int'(r != start);
      len = 0;
      if (n == 16) adv16 = 1'b1; else adv20 = 1'b1;
      do begin
        @(negedge clk);
        len++;
        r = ref_step(r, p, n);
        if (r != ((n == 16) ? 32'(st16) : 32'(st20))) mism++;
      end while (((n == 16) ? 32'(st16) : 32'(st20)) != start && len < (longint'(1) << n));
      adv16 = 1'b0; adv20 = 1'b0;
      checks++;
      if (mism != 0 || len > (longint'(1) << n) - 1) begin
        failures++;
        $display("FAIL N=%0d P=%h: length %0d, %0d mismatches with the reference", n, p, len, mism);
      end
      total += len;
      if (len > maxlen) maxlen = len;
    end
    $display("N=%0d: %0d configurations, average cycle length %0.2f, longest %0d, maximum possible %0d",
             n, confs, real'(total) / confs, maxlen, (longint'(1) << n) - 1);
    checks++;
    if (real'(total) / confs < real'(longint'(1) << (n - 5))) begin
      failures++;
      $display("FAIL N=%0d: average cycle length below 2^(N-5)", n);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    {ld16, adv16, ld20, adv20} = '0;
    p16 = '0; p20 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(16, CONF16);
    measure(20, CONF20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
