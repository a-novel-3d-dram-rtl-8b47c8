// edac_bch_dec: EDAC decoder, one 208-bit code word to a corrected 128-bit word.
//
// For each of the 8 interleaved blocks the syndromes S1 = r(alpha) and
// S3 = r(alpha^3) are formed, the double-error locator is solved directly and a
// Chien search over the 26 shortened positions finds the error bits. Up to two
// wrong bits per block are corrected (so one entire failed die is corrected);
// patterns the locator cannot place inside the block are flagged
// uncorrectable. lane_err_o marks every die lane in which a bit was corrected,
// which is what the sparing and logging logic count. Combinational.
// Correction/detection follows the cube description; the direct locator and
// the lane report are this design's choices.
module edac_bch_dec
  import cube_pkg::*, bch_pkg::*;
(
  input  logic [CODE_W-1:0]    code_i,
  output logic [DATA_W-1:0]    data_o,
  output logic                 ce_o,        // at least one bit corrected
  output logic                 ue_o,        // an uncorrectable block was seen
  output logic [NUM_LANES-1:0] lane_err_o   // lanes holding a corrected bit
);

  always_comb begin
    logic [BLK_N-1:0] r;
    bch_fix_t         fix;
    logic [CODE_W-1:0] c;
    c          = code_i;
    ce_o       = 1'b0;
    ue_o       = 1'b0;
    lane_err_o = '0;
    for (int j = 0; j < N_BLK; j++) begin
      for (int k = 0; k < BLK_N; k++) r[k] = code_i[code_index(j, k)];
      fix = bch_decode(r);
      ce_o |= fix.ce;
      ue_o |= fix.ue;
      for (int k = 0; k < BLK_N; k++)
        if (fix.flip[k]) begin
          c[code_index(j, k)] = ~c[code_index(j, k)];
          lane_err_o[code_index(j, k) / DQ_W] = 1'b1;
        end
    end
    data_o = c[DATA_W-1:0];
  end

endmodule
