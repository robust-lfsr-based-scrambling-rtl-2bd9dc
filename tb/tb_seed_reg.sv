// tb_seed_reg: self-checking test of the session seed register.
// Checks: empty after reset, captures the first RNG word (ready one cycle
// later), ignores every later word, and draws a fresh seed after a new reset.
module tb_seed_reg;
  localparam int N = 64;
  logic clk = 1'b0;
  logic rst_n, rng_valid, seed_ready;
  logic [N-1:0] rng_data, seed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seed_reg dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] first;
    for (int boot = 0; boot < 5; boot++) begin
      rst_n = 1'b0; rng_valid = 1'b0; rng_data = {$urandom, $urandom};
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      check("empty after reset", {seed_ready, seed}, '0);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      check("still empty", {seed_ready, seed}, '0);
      first = {$urandom, $urandom};
      rng_valid = 1'b1; rng_data = first;
      check("not ready before edge", {N+1}'(seed_ready), '0);
      @(negedge clk);
      check("captured", {seed_ready, seed}, {1'b1, first});
      for (int k = 0; k < 20; k++) begin
        rng_valid = $urandom_range(0, 1) != 0;
        rng_data = {$urandom, $urandom};
        @(negedge clk);
        check("held", {seed_ready, seed}, {1'b1, first});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
