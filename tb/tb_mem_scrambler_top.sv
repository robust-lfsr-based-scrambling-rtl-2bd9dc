// tb_mem_scrambler_top: end-to-end test of the scrambling unit at its default
// parameters (64-bit bus and LFSR, burst of 8, 64 LFSR steps per beat), with
// a behavioural DRAM behind it and this testbench acting as the memory
// controller and the RNG.
//
// Session 1 (boot, seed 1): write NB bursts of random plaintext, check that
//   every beat reaching the DRAM equals plaintext ^ keystream (reference model
//   below) in the cycle it is presented, then read all bursts back and check
//   the plaintext returns in the same cycle the DRAM delivers it. Extra RNG
//   words arrive during the session and must be ignored.
// Session 2 (reboot, seed 2): replay - read the bursts left over from
//   session 1 and check they no longer decode to the plaintext; then write the
//   same plaintext again and take a second DRAM snapshot.
// Stencil check: D = snapshot1 ^ snapshot2 is the cross-session differential
//   keystream. For every pair of 64-byte chunks of D the normalized Hamming
//   distance must be far from 0 (here: above 0.3; ideal 0.5), so no
//   equivalence class of repeating chunks forms.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_mem_scrambler_top;
  import glfsr_pkg::*;
  localparam int N = LFSR_W, BL = BURST_LEN, NB = 64, CL = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic rng_valid, seed_ready;
  logic [N-1:0] rng_data;
  logic wr_req_valid, wr_valid, dram_wr_valid, wr_armed;
  logic [ADDR_W-1:0] wr_req_addr, rd_req_addr;
  logic [N-1:0] wr_data, dram_wr_data;
  logic rd_req_valid, dram_rd_valid, rd_valid, rd_armed;
  logic [N-1:0] dram_rd_data, rd_data;
  logic wr_cmd, rd_cmd;
  logic [$clog2(NB)-1:0] cmd_burst;

  int checks = 0, failures = 0;
  int n_wr_bursts = 0, n_rd_bursts = 0, n_reboots = 0, n_late_rng = 0;
  int n_replay_corrupt = 0, n_stencil_pairs = 0;

  always #5 clk = ~clk;

  mem_scrambler_top dut (.*);

  dram_model #(.N(N), .DEPTH(NB), .BL(BL), .CL(CL)) dram (
    .clk, .wr_cmd, .rd_cmd, .cmd_burst,
    .wr_valid(dram_wr_valid), .wr_data(dram_wr_data),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference keystream ----------------
  function automatic logic [N-1:0] ref_step(logic [N-1:0] s, logic [N-1:0] p);
    logic fb;
    fb = s[0] ^ s[N-1];
    for (int i = 1; i <= N - 2; i++) if (p[i-1]) fb = fb ^ s[i];
    return {fb, s[N-1:1]};
  endfunction

  // Keystream word j of the burst at byte address addr.
  function automatic logic [N-1:0] ref_key(logic [ADDR_W-1:0] addr, logic [N-1:0] sd, int j);
    logic [N-1:0] p, s;
    p = N'(addr) ^ sd;
    s = p;
    for (int k = 0; k < (j + 1) * STEPS; k++) s = ref_step(s, p);
    return s;
  endfunction

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [N-1:0] plain [NB][BL];
  logic [N-1:0] snap1 [NB][BL];
  logic [N-1:0] snap2 [NB][BL];
  logic [N-1:0] cur_seed;

  function automatic logic [ADDR_W-1:0] burst_addr(int i);
    // 64-byte lines spread over the address space.
    return ADDR_W'(i * 64 + 32'h0010_0000);
  endfunction

  task automatic boot(output logic [N-1:0] sd);
    rst_n = 1'b0;
    {rng_valid, wr_req_valid, wr_valid, rd_req_valid, wr_cmd, rd_cmd} = '0;
    rng_data = '0; wr_data = '0; wr_req_addr = '0; rd_req_addr = '0; cmd_burst = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat ($urandom_range(1, 4)) @(negedge clk);
    sd = {$urandom, $urandom};
    rng_valid = 1'b1; rng_data = sd;
    @(negedge clk);
    rng_valid = 1'b0;
    check("seed ready", {(N)'(0), seed_ready}, {(N)'(0), 1'b1});
  endtask

  // Random RNG activity during a session; the seed must not change.
  task automatic rng_noise();
    if ($urandom_range(0, 3) == 0) begin
      rng_valid = 1'b1; rng_data = {$urandom, $urandom};
      n_late_rng++;
    end else rng_valid = 1'b0;
  endtask

  task automatic write_burst(int i, logic [N-1:0] sd);
    wr_req_valid = 1'b1; wr_req_addr = burst_addr(i);
    wr_cmd = 1'b1; cmd_burst = i[$clog2(NB)-1:0];
    rng_noise();
    @(negedge clk);
    wr_req_valid = 1'b0; wr_cmd = 1'b0;
    repeat ($urandom_range(0, 3)) begin rng_noise(); @(negedge clk); end
    for (int j = 0; j < BL; j++) begin
      wr_valid = 1'b1; wr_data = plain[i][j];
      rng_noise();
      #1;
      check("scrambled write beat", {dram_wr_valid, dram_wr_data},
            {1'b1, plain[i][j] ^ ref_key(burst_addr(i), sd, j)});
      @(negedge clk);
    end
    wr_valid = 1'b0; rng_valid = 1'b0;
    check("write burst closed", {(N)'(0), wr_armed}, '0);
    n_wr_bursts++;
  endtask

  // Read burst i; returns how many beats decoded to the plaintext.
  task automatic read_burst(int i, output int good);
    good = 0;
    rd_req_valid = 1'b1; rd_req_addr = burst_addr(i);
    rd_cmd = 1'b1; cmd_burst = i[$clog2(NB)-1:0];
    @(negedge clk);
    rd_req_valid = 1'b0; rd_cmd = 1'b0;
    for (int j = 0; j < BL; j++) begin
      int wait_cycles = 0;
      while (!dram_rd_valid) begin
        rng_noise();
        @(negedge clk);
        wait_cycles++;
        if (wait_cycles > 4 * CL) break;
      end
      #1;
      check("plaintext valid with DRAM data", {(N)'(0), rd_valid}, {(N)'(0), dram_rd_valid});
      if (rd_valid && rd_data == plain[i][j]) good++;
      @(negedge clk);
    end
    rng_valid = 1'b0;
    n_rd_bursts++;
  endtask

  initial begin
    int good;
    for (int i = 0; i < NB; i++)
      for (int j = 0; j < BL; j++) plain[i][j] = {$urandom, $urandom};
    // Some structured (low-entropy) plaintext, as in an image: all zeros.
    for (int j = 0; j < BL; j++) plain[0][j] = '0;

    // ---------------- session 1 ----------------
    boot(cur_seed);
    for (int i = 0; i < NB; i++) write_burst(i, cur_seed);
    for (int i = 0; i < NB; i++) begin
      read_burst(i, good);
      check("read back plaintext", N'(good) , N'(BL));
    end
    for (int i = 0; i < NB; i++)
      for (int j = 0; j < BL; j++) snap1[i][j] = dram.mem[i][j];

    // ---------------- session 2 ----------------
    begin
      logic [N-1:0] old_seed;
      old_seed = cur_seed;
      boot(cur_seed);
      n_reboots++;
      if (cur_seed == old_seed) cur_seed = ~cur_seed;  // practically never
    end
    // Replay: the DRAM still holds session-1 data.
    for (int i = 0; i < NB; i++) begin
      read_burst(i, good);
      checks++;
      if (good == 0) n_replay_corrupt++;
      else begin
        failures++;
        $display("FAIL replayed burst %0d decoded %0d beats", i, good);
      end
    end
    for (int i = 0; i < NB; i++) write_burst(i, cur_seed);
    for (int i = 0; i < NB; i++) begin
      for (int j = 0; j < BL; j++) begin
        snap2[i][j] = dram.mem[i][j];
        checks++;
        if (snap2[i][j] == snap1[i][j]) begin
          failures++;
          $display("FAIL beat %0d/%0d scrambled identically in both sessions", i, j);
        end
      end
      read_burst(i, good);
      check("session-2 read back", N'(good), N'(BL));
    end

    // ---------------- stencil (differential) analysis ----------------
    begin
      real hd, sum_hd, min_hd;
      int bits;
      sum_hd = 0.0; min_hd = 1.0;
      for (int a = 0; a < NB; a++)
        for (int b = a + 1; b < NB; b++) begin
          bits = 0;
          for (int j = 0; j < BL; j++)
            bits += $countones((snap1[a][j] ^ snap2[a][j]) ^ (snap1[b][j] ^ snap2[b][j]));
          hd = real'(bits) / real'(N * BL);
          sum_hd += hd;
          if (hd < min_hd) min_hd = hd;
          n_stencil_pairs++;
          checks++;
          if (hd < 0.3) begin
            failures++;
            if (failures < 20) $display("FAIL differential chunks %0d and %0d too similar: %f", a, b, hd);
          end
        end
      $display("differential keystream: %0d chunk pairs, mean normalized Hamming distance %f, min %f",
               n_stencil_pairs, sum_hd / n_stencil_pairs, min_hd);
    end

    $display("mechanisms: write bursts %0d, read bursts %0d, reboots %0d, late RNG words ignored %0d, replays corrupted %0d, stencil pairs %0d",
             n_wr_bursts, n_rd_bursts, n_reboots, n_late_rng, n_replay_corrupt, n_stencil_pairs);
    if (n_wr_bursts == 0 || n_rd_bursts == 0 || n_reboots == 0 || n_late_rng == 0 ||
        n_replay_corrupt == 0 || n_stencil_pairs == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
