// bist: built-in self test, initialisation and zeroisation of the stack.
//
// On start_i the test writes every burst from 0 to n_bursts_i-1 with a pattern
// that varies with address, beat and 32-bit word position (or all zeros when
// zeroize_i is set), then reads every burst back through the EDAC and compares.
// Each mismatching burst, and each burst that needed correction (a potential
// fault location), is reported on log_valid_o with its address, so the
// diagnostic log holds the fault map. done_o pulses at the end; n_fail_o
// counts miscompares, n_ce_o corrected bursts.
// Pattern word k of beat b at burst a:
//   (a * 0x9E3779B1 + b * 0x85EBCA6B + k * 0x27D4EB2F) ^ seed_i.
// Initialising/zeroising with a varying pattern and health testing are the
// cube description's; the pattern and the two-pass order are this design's.
module bist
  import cube_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic               zeroize_i,
  input  logic [31:0]        seed_i,
  input  logic [BADDR_W-1:0] n_bursts_i,
  output logic               busy_o,
  output logic               done_o,
  output logic [31:0]        n_fail_o,
  output logic [31:0]        n_ce_o,
  output logic               log_valid_o,
  output diag_rec_t          log_o,
  output logic               req_valid_o,
  output ctrl_req_t          req_o,
  input  logic               req_ready_i,
  output logic               wdata_valid_o,
  output logic [DATA_W-1:0]  wdata_o,
  input  logic               wdata_ready_i,
  input  logic               rd_valid_i,
  input  logic [DATA_W-1:0]  rd_data_i,
  input  logic               rd_ce_i,
  input  logic               rd_ue_i,
  input  logic               rd_last_i
);

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WDATA, S_RREQ, S_RWAIT} state_e;
  state_e             state;
  logic [BADDR_W-1:0] addr;
  logic [2:0]         beat;
  logic               zero_q, bad, ce_acc, ue_acc;
  logic [31:0]        seed_q;

  function automatic logic [DATA_W-1:0] pattern(logic [BADDR_W-1:0] a, logic [2:0] b,
                                                logic [31:0] seed, logic zero);
    logic [DATA_W-1:0] p;
    for (int k = 0; k < 4; k++)
      p[k*32 +: 32] = (32'(a) * 32'h9E3779B1 + 32'(b) * 32'h85EBCA6B + 32'(k) * 32'h27D4EB2F) ^ seed;
    return zero ? '0 : p;
  endfunction

  assign busy_o        = (state != S_IDLE);
  assign req_valid_o   = (state == S_WREQ) || (state == S_RREQ);
  assign req_o         = '{write: state == S_WREQ, src: SRC_BIST, addr: baddr_t'(addr)};
  assign wdata_valid_o = (state == S_WDATA);
  assign wdata_o       = pattern(addr, beat, seed_q, zero_q);

  // error flags of the burst being read back, including the current beat
  logic b_bad, b_ce, b_ue;
  assign b_bad = bad | (rd_data_i != pattern(addr, beat, seed_q, zero_q));
  assign b_ce  = ce_acc | rd_ce_i;
  assign b_ue  = ue_acc | rd_ue_i;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; beat <= '0; zero_q <= 1'b0; seed_q <= '0;
      bad <= 1'b0; ce_acc <= 1'b0; ue_acc <= 1'b0;
      done_o <= 1'b0; n_fail_o <= '0; n_ce_o <= '0; log_valid_o <= 1'b0; log_o <= '0;
    end else begin
      done_o      <= 1'b0;
      log_valid_o <= 1'b0;
      case (state)
        S_IDLE: if (start_i) begin
          zero_q   <= zeroize_i;
          seed_q   <= seed_i;
          addr     <= '0;
          beat     <= '0;
          n_fail_o <= '0;
          n_ce_o   <= '0;
          state    <= S_WREQ;
        end
        S_WREQ: if (req_ready_i) state <= S_WDATA;
        S_WDATA: if (wdata_ready_i) begin
          beat <= beat + 1'b1;
          if (beat == 3'(BL-1)) begin
            beat <= '0;
            if (addr == n_bursts_i - 1'b1) begin
              addr  <= '0;
              state <= S_RREQ;
            end else begin
              addr  <= addr + 1'b1;
              state <= S_WREQ;
            end
          end
        end
        S_RREQ: if (req_ready_i) begin
          state  <= S_RWAIT;
          bad    <= 1'b0;
          ce_acc <= 1'b0;
          ue_acc <= 1'b0;
        end
        S_RWAIT: if (rd_valid_i) begin
          bad    <= b_bad;
          ce_acc <= b_ce;
          ue_acc <= b_ue;
          beat   <= beat + 1'b1;
          if (rd_last_i) begin
            beat <= '0;
            if (b_bad) n_fail_o <= n_fail_o + 1;
            if (b_ce)  n_ce_o   <= n_ce_o + 1;
            if (b_bad || b_ce || b_ue) begin
              log_valid_o <= 1'b1;
              log_o       <= '{src: SRC_BIST, addr: baddr_t'(addr), ce: b_ce, ue: b_ue,
                              miscompare: b_bad, lanes: '0};
            end
            if (addr == n_bursts_i - 1'b1) begin
              state  <= S_IDLE;
              done_o <= 1'b1;
            end else begin
              addr  <= addr + 1'b1;
              state <= S_RREQ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end

endmodule
