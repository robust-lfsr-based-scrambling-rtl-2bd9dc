// dram_model: behavioural stand-in for the external DRAM used by the
// top-level testbench (not synthesizable intent; simulation only).
//
// It stores DEPTH bursts of BL beats of N bits. A write command (wr_cmd with
// cmd_burst) opens a burst; each following wr_valid beat is stored in order.
// A read command (rd_cmd with cmd_burst) returns the BL beats of that burst
// on consecutive cycles, starting CL cycles after the command. The array is
// not cleared by any reset, so its contents survive a reboot of the memory
// controller, like charge remaining in DRAM cells. The testbench reads and
// writes `mem` directly to take snapshots and to replay old contents.
module dram_model #(
  parameter int N     = 64,
  parameter int DEPTH = 64,
  parameter int BL    = 8,
  parameter int CL    = 5
) (
  input  logic                     clk,
  input  logic                     wr_cmd,
  input  logic                     rd_cmd,
  input  logic [$clog2(DEPTH)-1:0] cmd_burst,
  input  logic                     wr_valid,
  input  logic [N-1:0]             wr_data,
  output logic                     rd_valid,
  output logic [N-1:0]             rd_data
);
  logic [N-1:0] mem [DEPTH][BL];
  int wr_idx = 0, wr_beat = BL;
  int rd_idx = 0, rd_wait = -1, rd_beat = BL;

  initial begin
    for (int i = 0; i < DEPTH; i++)
      for (int j = 0; j < BL; j++) mem[i][j] = '0;
    rd_valid = 1'b0;
    rd_data  = '0;
  end

  always @(posedge clk) begin
    // write side
    if (wr_cmd) begin
      wr_idx  = int'(cmd_burst);
      wr_beat = 0;
    end else if (wr_valid && wr_beat < BL) begin
      mem[wr_idx][wr_beat] = wr_data;
      wr_beat++;
    end
    // read side
    if (rd_cmd) begin
      rd_idx  = int'(cmd_burst);
      rd_wait = CL - 1;
      rd_beat = 0;
    end else if (rd_wait > 0) begin
      rd_wait--;
    end else if (rd_wait == 0 && rd_beat < BL) begin
      rd_beat++;
    end
    if (rd_wait == 0 && rd_beat < BL) begin
      rd_valid <= 1'b1;
      rd_data  <= mem[rd_idx][rd_beat];
    end else begin
      rd_valid <= 1'b0;
    end
  end
endmodule
