// tb_lfsr_scrambler: self-checking test of one scrambling channel.
//
// Two channels run side by side on the same stimulus: one at the default
// parameters (64-bit LFSR, 64 LFSR steps per keystream word, burst of 8) and
// one with one step per word. Random seeds, addresses, request-to-data gaps
// and idle cycles inside bursts are applied. Every beat's output is compared,
// in the same cycle it is presented (zero added latency), with
// in_data ^ K_j, where K_j is the LFSR state after (j+1)*STEPS steps from
// P = Address ^ Seed, computed by a reference model in this file. The armed
// flag is checked to open on a request and close after the eighth beat; in
// every third burst the next request arrives in the cycle of the last beat.
module tb_lfsr_scrambler;
  localparam int N = 64, ADDR_W = 32, BL = 8;
  logic clk = 1'b0;
  logic rst_n;
  logic [N-1:0] seed, in_data, out_a, out_b;
  logic req_valid, in_valid, ov_a, ov_b, armed_a, armed_b;
  logic [ADDR_W-1:0] req_addr;
  int checks = 0, failures = 0;
  int n_overlap = 0;

  always #5 clk = ~clk;

  lfsr_scrambler dut_a (
    .clk, .rst_n, .seed, .req_valid, .req_addr, .in_valid, .in_data,
    .out_valid(ov_a), .out_data(out_a), .armed(armed_a));
  lfsr_scrambler #(.STEPS(1)) dut_b (
    .clk, .rst_n, .seed, .req_valid, .req_addr, .in_valid, .in_data,
    .out_valid(ov_b), .out_data(out_b), .armed(armed_b));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_step(logic [N-1:0] s, logic [N-1:0] p);
    logic fb;
    fb = s[0] ^ s[N-1];
    for (int i = 1; i <= N - 2; i++) if (p[i-1]) fb = fb ^ s[i];
    return {fb, s[N-1:1]};
  endfunction

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] p, sa, sb;
    logic pre;
    rst_n = 1'b0; req_valid = 1'b0; in_valid = 1'b0; in_data = '0;
    seed = '0; req_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", {armed_a, armed_b, (N-1)'(0)}, '0);
    pre = 1'b0;
    for (int b = 0; b < 400; b++) begin
      if (!pre) begin
        if (b % 50 == 0) seed = {$urandom, $urandom};
        req_addr = (b % 7 == 0) ? ADDR_W'(b) : $urandom;
        req_valid = 1'b1;
        p = N'(req_addr) ^ seed;
        @(negedge clk);
      end
      sa = p;
      for (int k = 0; k < N; k++) sa = ref_step(sa, p);
      sb = ref_step(p, p);
      req_valid = 1'b0;
      req_addr = $urandom;           // must not matter after the request
      check("armed after request", {armed_a, armed_b, (N-1)'(0)}, {2'b11, (N-1)'(0)});
      if (!pre) repeat ($urandom_range(0, 3)) @(negedge clk);
      pre = 1'b0;
      for (int j = 0; j < BL; j++) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0; in_data = {$urandom, $urandom};
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data = {$urandom, $urandom};
        #1;
        check("default channel beat", {ov_a, out_a}, {1'b1, in_data ^ sa});
        check("one-step channel beat", {ov_b, out_b}, {1'b1, in_data ^ sb});
        for (int k = 0; k < N; k++) sa = ref_step(sa, p);
        sb = ref_step(sb, p);
        // Sometimes the next burst's request shares the last beat's cycle.
        if (j == BL - 1 && b % 3 == 1) begin
          pre = 1'b1;
          n_overlap++;
          req_valid = 1'b1;
          req_addr = $urandom;
          p = N'(req_addr) ^ seed;
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      if (!pre) begin
        check("burst closed", {armed_a, armed_b, (N-1)'(0)}, '0);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping request"); end
    $display("overlapping requests: %0d", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
