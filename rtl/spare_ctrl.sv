// spare_ctrl: cold-spare die management and data steering.
//
// Counts, per coded lane (die), the read beats in which the EDAC corrected a
// bit of that lane. When a lane's count reaches THRESH, or on a forced swap,
// the lane is retired: from then on its data is steered to the spare die on
// writes and taken from the spare die on reads, and swap_o pulses so that the
// rebuild logic can refill the spare with corrected data. Only one spare
// exists; later requests are ignored. Steering is combinational: die_wr_o
// carries lanes 0..12 to dies 0..12 plus the retired lane to die 13;
// lane_rd_o takes every lane from its own die except the retired one.
// Swapping a deficient die for a spare according to error reports is the
// cube description's; the counting rule and threshold are this design's.
module spare_ctrl
  import cube_pkg::*;
#(
  parameter int THRESH = 64
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              err_valid_i,
  input  logic [NUM_LANES-1:0]              lane_err_i,
  input  logic                              force_i,
  input  logic [3:0]                        force_lane_i,
  output logic                              active_o,
  output logic [3:0]                        lane_o,
  output logic                              swap_o,
  input  logic [NUM_LANES-1:0][BURST_W-1:0] lane_wr_i,
  output logic [NUM_DIES-1:0][BURST_W-1:0]  die_wr_o,
  input  logic [NUM_DIES-1:0][BURST_W-1:0]  die_rd_i,
  output logic [NUM_LANES-1:0][BURST_W-1:0] lane_rd_o
);

  logic [NUM_LANES-1:0][15:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt      <= '0;
      active_o <= 1'b0;
      lane_o   <= '0;
      swap_o   <= 1'b0;
    end else begin
      swap_o <= 1'b0;
      if (err_valid_i)
        for (int l = 0; l < NUM_LANES; l++)
          if (lane_err_i[l] && cnt[l] != '1) cnt[l] <= cnt[l] + 1'b1;
      if (!active_o) begin
        if (force_i && 32'(force_lane_i) < NUM_LANES) begin
          active_o <= 1'b1;
          lane_o   <= force_lane_i;
          swap_o   <= 1'b1;
        end else
          for (int l = NUM_LANES-1; l >= 0; l--)
            if (32'(cnt[l]) >= THRESH) begin
              active_o <= 1'b1;
              lane_o   <= 4'(l);
              swap_o   <= 1'b1;
            end
      end
    end

  always_comb begin
    for (int l = 0; l < NUM_LANES; l++) begin
      die_wr_o[l]  = lane_wr_i[l];
      lane_rd_o[l] = (active_o && lane_o == 4'(l)) ? die_rd_i[NUM_DIES-1] : die_rd_i[l];
    end
    die_wr_o[NUM_DIES-1] = active_o ? lane_wr_i[lane_o] : '0;
  end

endmodule
