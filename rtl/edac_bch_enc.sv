// edac_bch_enc: EDAC encoder, one 128-bit data word to one 208-bit code word.
//
// The word is cut into 8 interleaved blocks (see bch_pkg::code_index); each
// block gets 10 BCH parity bits, 80 in all, stored on the 5 ECC dies. The
// code word is systematic: bits [127:0] are the data, [207:128] the parity,
// 16 bits per die lane. Purely combinational, no latency.
// The 80 parity bits over 8 data dies x16 follow the cube description; the
// block split and interleave are this design's choice that lets one failed
// die be corrected.
module edac_bch_enc
  import cube_pkg::*, bch_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  output logic [CODE_W-1:0] code_o
);

  always_comb begin
    logic [BLK_K-1:0] d;
    logic [BLK_P-1:0] p;
    code_o = '0;
    code_o[DATA_W-1:0] = data_i;
    for (int j = 0; j < N_BLK; j++) begin
      for (int i = 0; i < BLK_K; i++) d[i] = data_i[code_index(j, BLK_P + i)];
      p = bch_parity(d);
      for (int k = 0; k < BLK_P; k++) code_o[code_index(j, k)] = p[k];
    end
  end

endmodule
