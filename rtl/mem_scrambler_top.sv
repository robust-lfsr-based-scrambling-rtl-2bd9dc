// mem_scrambler_top: the scrambling unit of a DDR3 memory controller built on
// generic LFSRs.
//
// Data written to DRAM is XORed with a keystream from a write-path generic
// LFSR; data read back is XORed with the same keystream, regenerated by a
// read-path generic LFSR. Both LFSRs are configured per transaction by
// P = Address ^ Seed, so the keystream depends on the address and on a seed
// drawn from a hardware RNG at every boot. Because the tap structure changes
// with P, the XOR of two sessions' keystreams is not periodic, which is what
// a stencil (differential cold-boot) attack relies on.
//
// Structure: seed_reg captures the RNG seed once per boot; u_wr (scrambler)
// sits between the controller's write data and the DRAM write bus; u_rd
// (de-scrambler) sits between the DRAM read bus and the controller's read
// data. The RNG, the rest of the memory controller and the DRAM device are
// outside this block: their signals are ports.
//
// Interface / timing:
//   rng_valid/rng_data     - entropy source; first word after reset = seed.
//   seed_ready             - seed captured; requests are legal from then on.
//   wr_req_valid/wr_req_addr, wr_valid/wr_data -> dram_wr_valid/dram_wr_data
//   rd_req_valid/rd_req_addr, dram_rd_valid/dram_rd_data -> rd_valid/rd_data
// A request precedes its burst by at least one cycle (CAS / CAS-write
// latency); the data path itself is combinational, zero added cycles.
// Burst length, widths and the request interface are this design's choices.
module mem_scrambler_top #(
  parameter int unsigned N         = glfsr_pkg::LFSR_W,
  parameter int unsigned ADDR_W    = glfsr_pkg::ADDR_W,
  parameter int unsigned BURST_LEN = glfsr_pkg::BURST_LEN,
  parameter int unsigned STEPS     = glfsr_pkg::STEPS
) (
  input  logic              clk,
  input  logic              rst_n,
  // hardware RNG (outside this block)
  input  logic              rng_valid,
  input  logic [N-1:0]      rng_data,
  output logic              seed_ready,
  // write path: controller -> DRAM
  input  logic              wr_req_valid,
  input  logic [ADDR_W-1:0] wr_req_addr,
  input  logic              wr_valid,
  input  logic [N-1:0]      wr_data,
  output logic              dram_wr_valid,
  output logic [N-1:0]      dram_wr_data,
  output logic              wr_armed,
  // read path: DRAM -> controller
  input  logic              rd_req_valid,
  input  logic [ADDR_W-1:0] rd_req_addr,
  input  logic              dram_rd_valid,
  input  logic [N-1:0]      dram_rd_data,
  output logic              rd_valid,
  output logic [N-1:0]      rd_data,
  output logic              rd_armed
);
  logic [N-1:0] seed;

  seed_reg #(.N(N)) u_seed (
    .clk        (clk),
    .rst_n      (rst_n),
    .rng_valid  (rng_valid),
    .rng_data   (rng_data),
    .seed       (seed),
    .seed_ready (seed_ready)
  );

  lfsr_scrambler #(.N(N), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN), .STEPS(STEPS)) u_wr (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed      (seed),
    .req_valid (wr_req_valid),
    .req_addr  (wr_req_addr),
    .in_valid  (wr_valid),
    .in_data   (wr_data),
    .out_valid (dram_wr_valid),
    .out_data  (dram_wr_data),
    .armed     (wr_armed)
  );

  lfsr_scrambler #(.N(N), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN), .STEPS(STEPS)) u_rd (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed      (seed),
    .req_valid (rd_req_valid),
    .req_addr  (rd_req_addr),
    .in_valid  (dram_rd_valid),
    .in_data   (dram_rd_data),
    .out_valid (rd_valid),
    .out_data  (rd_data),
    .armed     (rd_armed)
  );

  // No transaction may start before the session seed exists.
  a_req_after_seed: assert property (@(posedge clk) disable iff (!rst_n)
                                     (wr_req_valid || rd_req_valid) |-> seed_ready)
    else $error("mem_scrambler_top: request before the session seed was drawn");
endmodule
