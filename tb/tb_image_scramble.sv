// tb_image_scramble: scrambles a synthetic 8-bit grayscale image through the
// write-path channel and back through a read-path channel, and measures how
// much of the image's structure survives in the stored (scrambled) bytes.
//
// The 64x64 image (4096 bytes, 64 bursts of 8 beats of 64 bits, one burst per
// 64-byte line) is a horizontal gradient with a bright disc and flat black
// border, so many 8-byte beats repeat. Metrics over all pixels:
//   Pearson correlation of plain vs scrambled bytes   - checked |r| < 0.08
//   mean squared error between them                   - checked > 5000
//   chi-square of the scrambled byte histogram against a flat one (255
//     degrees of freedom)                             - checked < 400
//   repeated 8-byte beats: plain vs scrambled         - scrambled must have none
// and the read channel must return every pixel unchanged.
module tb_image_scramble;
  import glfsr_pkg::*;
  localparam int N = LFSR_W, BL = BURST_LEN, W = 64, H = 64;
  localparam int NBEATS = W * H / (N / 8);

  logic clk = 1'b0;
  logic rst_n;
  logic [N-1:0] seed;
  logic req_valid, in_valid, ov_w, ov_r, armed_w, armed_r;
  logic [ADDR_W-1:0] req_addr;
  logic [N-1:0] in_data, scr, back;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Write channel scrambles; the read channel, fed with the write channel's
  // output and the same address and seed, must undo it in the same cycle.
  lfsr_scrambler u_w (.clk, .rst_n, .seed, .req_valid, .req_addr, .in_valid, .in_data,
                      .out_valid(ov_w), .out_data(scr), .armed(armed_w));
  lfsr_scrambler u_r (.clk, .rst_n, .seed, .req_valid, .req_addr, .in_valid(ov_w), .in_data(scr),
                      .out_valid(ov_r), .out_data(back), .armed(armed_r));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img [W*H];
  byte unsigned enc [W*H];
  logic [N-1:0] beat_p [NBEATS];
  logic [N-1:0] beat_c [NBEATS];

  function automatic int repeats(ref logic [N-1:0] b [NBEATS]);
    int r = 0;
    for (int i = 0; i < NBEATS; i++)
      for (int j = 0; j < i; j++)
        if (b[i] == b[j]) begin r++; break; end
    return r;
  endfunction

  initial begin
    real mx, my, sxy, sxx, syy, r, mse, chi;
    int hist [256];
    int rp, rc;
    // Build the image.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int dx = x - 32, dy = y - 32;
        if (x < 8 || x >= 56) img[y*W+x] = 8'd0;
        else if (dx*dx + dy*dy < 225) img[y*W+x] = 8'd240;
        else img[y*W+x] = 8'((x - 8) * 4);
      end
    for (int i = 0; i < NBEATS; i++)
      for (int k = 0; k < N / 8; k++) beat_p[i][8*k +: 8] = img[i*(N/8)+k];

    rst_n = 1'b0; req_valid = 1'b0; in_valid = 1'b0; in_data = '0; req_addr = '0;
    seed = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBEATS / BL; b++) begin
      req_valid = 1'b1; req_addr = ADDR_W'(b * 64);
      @(negedge clk);
      req_valid = 1'b0;
      for (int j = 0; j < BL; j++) begin
        in_valid = 1'b1; in_data = beat_p[b*BL+j];
        #1;
        beat_c[b*BL+j] = scr;
        checks++;
        if (!(ov_r && back == in_data)) begin
          failures++;
          $display("FAIL beat %0d not restored: %h vs %h", b*BL+j, back, in_data);
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    for (int i = 0; i < NBEATS; i++)
      for (int k = 0; k < N / 8; k++) enc[i*(N/8)+k] = beat_c[i][8*k +: 8];

    // Statistics.
    mx = 0; my = 0;
    foreach (hist[v]) hist[v] = 0;
    for (int i = 0; i < W*H; i++) begin
      mx += img[i]; my += enc[i]; hist[enc[i]]++;
    end
    mx /= W*H; my /= W*H;
    sxy = 0; sxx = 0; syy = 0; mse = 0;
    for (int i = 0; i < W*H; i++) begin
      sxy += (img[i] - mx) * (enc[i] - my);
      sxx += (img[i] - mx) ** 2;
      syy += (enc[i] - my) ** 2;
      mse += (real'(img[i]) - real'(enc[i])) ** 2;
    end
    r = sxy / ($sqrt(sxx) * $sqrt(syy));
    mse /= W*H;
    chi = 0;
    foreach (hist[v]) chi += (hist[v] - (W*H/256.0)) ** 2 / (W*H/256.0);
    rp = repeats(beat_p);
    rc = repeats(beat_c);
    $display("image %0dx%0d: Pearson r = %f, MSE = %0.2f, chi-square (scrambled histogram) = %0.1f",
             W, H, r, mse, chi);
    $display("repeated 8-byte beats: plaintext %0d, scrambled %0d", rp, rc);
    checks += 5;
    if (!(r < 0.08 && r > -0.08)) begin failures++; $display("FAIL correlation"); end
    if (!(mse > 5000.0))          begin failures++; $display("FAIL MSE"); end
    if (!(chi < 400.0))           begin failures++; $display("FAIL histogram not flat"); end
    if (rp == 0)                  begin failures++; $display("FAIL image has no repeats to hide"); end
    if (rc != 0)                  begin failures++; $display("FAIL scrambled beats repeat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
