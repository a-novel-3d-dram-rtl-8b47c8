// nmr_voter: voting / parity logic for chained cubes.
//
// Several cubes can be chained and run in lock step. All reads happen in
// parallel, so the only added latency is this voter: mode_i = 1 (TMR) takes
// the bitwise majority of the local word and the two peer words and flags in
// disagree_o which inputs differed from the result; mode_i = 2 (XOR parity)
// rebuilds a missing cube's word as the XOR of the others, a parity stack
// holding the XOR of the data stacks; mode_i = 0 passes the local word.
// The output is registered: one cycle from valid_i to valid_o.
// N-modular redundancy and the XOR parity stack are the cube description's;
// restricting N to 3 and the register stage are this design's choices.
module nmr_voter
  import cube_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        mode_i,
  input  logic              valid_i,
  input  logic [DATA_W-1:0] local_i,
  input  logic [DATA_W-1:0] peer0_i,
  input  logic [DATA_W-1:0] peer1_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o,
  output logic [2:0]        disagree_o
);

  logic [DATA_W-1:0] maj, y;

  always_comb begin
    maj = (local_i & peer0_i) | (local_i & peer1_i) | (peer0_i & peer1_i);
    case (mode_i)
      2'd1:    y = maj;
      2'd2:    y = local_i ^ peer0_i ^ peer1_i;
      default: y = local_i;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid_o    <= 1'b0;
      data_o     <= '0;
      disagree_o <= '0;
    end else begin
      valid_o    <= valid_i;
      data_o     <= y;
      disagree_o <= (valid_i && mode_i == 2'd1) ?
                    {peer1_i != maj, peer0_i != maj, local_i != maj} : 3'b000;
    end

endmodule
