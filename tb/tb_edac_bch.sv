// tb_edac_bch: self-checking test of the BCH EDAC encoder and decoder.
// Random 128-bit words are encoded, corrupted and decoded: no error, one bit,
// two bits anywhere, one whole die lane (data or parity) wiped, and the spare
// pattern of a die stuck at all ones. Every case must return the original
// word, the right ce flag and the set of corrupted lanes that held a flipped bit.
// Three errors placed in one block must never come back silently wrong as
// "no error".
module tb_edac_bch;
  import cube_pkg::*;

  logic [DATA_W-1:0]    data, dout;
  logic [CODE_W-1:0]    code, rx;
  logic                 ce, ue;
  logic [NUM_LANES-1:0] lerr, exp_lanes;
  int checks = 0, failures = 0;

  edac_bch_enc u_enc (.data_i(data), .code_o(code));
  edac_bch_dec u_dec (.code_i(rx), .data_o(dout), .ce_o(ce), .ue_o(ue), .lane_err_o(lerr));

  function automatic logic [DATA_W-1:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(string what, logic exp_ce, logic [NUM_LANES-1:0] lanes);
    #1;
    checks++;
    if (dout !== data || ce !== exp_ce || ue !== 1'b0 || lerr !== lanes) begin
      failures++;
      $display("FAIL %s: data %h exp %h ce %b ue %b lanes %b exp %b", what, dout, data, ce, ue, lerr, lanes);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b0, b1, lane, blk_hits;
    logic [DQ_W-1:0] junk;
    for (int t = 0; t < 200; t++) begin
      data = rnd128(); #1;
      // parity must not be all zero for a nonzero word
      checks++;
      if (data != '0 && code[CODE_W-1:DATA_W] == '0) failures++;
      rx = code; check("clean", 1'b0, '0);
      b0 = $urandom_range(CODE_W-1);
      rx = code; rx[b0] ^= 1'b1; check("1bit", 1'b1, 13'(1) << (b0/DQ_W));
      b1 = $urandom_range(CODE_W-1);
      if (b1 != b0) begin
        rx = code; rx[b0] ^= 1'b1; rx[b1] ^= 1'b1;
        check("2bit", 1'b1, (13'(1) << (b0/DQ_W)) | (13'(1) << (b1/DQ_W)));
      end
      lane = $urandom_range(NUM_LANES-1);
      junk = 16'($urandom);
      rx = code; rx[lane*DQ_W +: DQ_W] ^= junk;
      check("die", junk != 0, (junk != 0) ? (13'(1) << lane) : '0);
      rx = code; rx[lane*DQ_W +: DQ_W] = '1;
      exp_lanes = (code[lane*DQ_W +: DQ_W] != '1) ? (13'(1) << lane) : '0;
      check("stuck", code[lane*DQ_W +: DQ_W] != '1, exp_lanes);
      // three flips in block 0 (lanes 0,1,2 bit 0): must raise ue or ce, never pass silently
      rx = code; rx[0] ^= 1'b1; rx[16] ^= 1'b1; rx[32] ^= 1'b1; #1;
      checks++;
      if (!(ue || ce)) begin failures++; $display("FAIL triple undetected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
