// tb_generic_lfsr: self-checking test of the generic LFSR.
//
// 1. A 6-bit instance (STEPS=1) is loaded with the four configuration words of
//    the scheme's two-device / two-address example (P = Seed ^ Address) and
//    its eight successive states are compared with the printed keystreams.
// 2. A 9-bit instance (STEPS=1) and a 16-bit instance (STEPS=16) are loaded
//    with random P values and compared, step by step, with a bit-level
//    reference model written independently here. Random advance/idle cycles
//    check that the state holds when advance is low.
module tb_generic_lfsr;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: one step of an n-bit generic LFSR, inner taps a[i] = p[i-1].
  function automatic logic [63:0] ref_step(logic [63:0] s, logic [63:0] p, int n);
    logic fb;
    fb = s[0] ^ s[n-1];
    for (int i = 1; i <= n - 2; i++) if (p[i-1]) fb = fb ^ s[i];
    s = s >> 1;
    s[n-1] = fb;
    return s;
  endfunction

  // ---------------- 6-bit instance, example vectors ----------------
  logic       ld6, adv6;
  logic [5:0] p6, st6;
  generic_lfsr #(.N(6), .STEPS(1)) u6 (.clk, .rst_n, .load(ld6), .p(p6), .advance(adv6), .state(st6));

  // ---------------- 9-bit and 16-bit instances ---------------------
  logic        ld9, adv9, ld16, adv16;
  logic [8:0]  p9, st9;
  logic [15:0] p16, st16;
  generic_lfsr #(.N(9),  .STEPS(1))  u9  (.clk, .rst_n, .load(ld9),  .p(p9),  .advance(adv9),  .state(st9));
  generic_lfsr #(.N(16), .STEPS(16)) u16 (.clk, .rst_n, .load(ld16), .p(p16), .advance(adv16), .state(st16));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [5:0] ex_p [4];
  logic [5:0] ex_k [4][8];

  initial begin
    // Seed 110010 / 001011, address 1000 / 1010.
    ex_p[0] = 6'b111010;
    ex_k[0] = '{6'b011101, 6'b101110, 6'b010111, 6'b101011, 6'b010101, 6'b101010, 6'b110101, 6'b011010};
    ex_p[1] = 6'b000011;
    ex_k[1] = '{6'b000001, 6'b100000, 6'b110000, 6'b111000, 6'b111100, 6'b011110, 6'b001111, 6'b100111};
    ex_p[2] = 6'b111000;
    ex_k[2] = '{6'b011100, 6'b101110, 6'b110111, 6'b111011, 6'b111101, 6'b111110, 6'b011111, 6'b001111};
    ex_p[3] = 6'b000001;
    ex_k[3] = '{6'b100000, 6'b110000, 6'b111000, 6'b111100, 6'b111110, 6'b011111, 6'b001111, 6'b000111};

    rst_n = 1'b0;
    {ld6, adv6, ld9, adv9, ld16, adv16} = '0;
    p6 = '0; p9 = '0; p16 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset state", {st6, st9, st16}, '0);

    // Example vectors.
    for (int e = 0; e < 4; e++) begin
      @(negedge clk);
      ld6 = 1'b1; p6 = ex_p[e]; adv6 = 1'b0;
      @(negedge clk);
      ld6 = 1'b0;
      for (int k = 0; k < 8; k++) begin
        check($sformatf("example %0d word %0d", e, k), 64'(st6), 64'(ex_k[e][k]));
        adv6 = 1'b1;
        @(negedge clk);
        adv6 = 1'b0;
      end
    end

    // Random configurations against the reference model.
    for (int t = 0; t < 300; t++) begin
      logic [63:0] r9, r16, tp9, tp16;
      @(negedge clk);
      p9  = 9'($urandom);
      p16 = 16'($urandom);
      ld9 = 1'b1; ld16 = 1'b1;
      tp9 = 64'(p9); tp16 = 64'(p16);
      r9 = ref_step(64'(p9), tp9, 9);
      r16 = 64'(p16);
      for (int k = 0; k < 16; k++) r16 = ref_step(r16, tp16, 16);
      @(negedge clk);
      ld9 = 1'b0; ld16 = 1'b0;
      for (int k = 0; k < 20; k++) begin
        check("9-bit state", 64'(st9), r9);
        check("16-bit state", 64'(st16), r16);
        adv9  = ($urandom_range(0, 3) != 0);
        adv16 = adv9;
        // The next load's P must not disturb the running sequence.
        p9 = 9'($urandom); p16 = 16'($urandom);
        if (adv9) begin
          r9 = ref_step(r9, tp9, 9);
          for (int j = 0; j < 16; j++) r16 = ref_step(r16, tp16, 16);
        end
        @(negedge clk);
      end
      adv9 = 1'b0; adv16 = 1'b0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
