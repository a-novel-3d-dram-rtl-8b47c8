// tb_mem_responder: behavioural stand-in for the DRAM controller + EDAC read
// path, used by the tests of the maintenance engines (scrub, rebuild, BIST).
// Accepts a request every READY_GAP cycles, takes BL write beats after a
// write request and stores the burst, and answers a read LAT cycles later
// with BL beats. Bursts marked with mark_ce()/mark_ue() come back with the
// corresponding EDAC flag on their third beat; a write clears the marks.
// Every request is recorded in order in the log queues.
module tb_mem_responder
  import cube_pkg::*;
#(
  parameter int LAT = 5
) (
  input  logic              clk,
  input  logic              req_valid,
  input  ctrl_req_t         req,
  output logic              req_ready,
  input  logic              wdata_valid,
  input  logic [DATA_W-1:0] wdata,
  output logic              wdata_ready,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_ce,
  output logic              rd_ue,
  output logic              rd_last
);
  typedef logic [BL-1:0][DATA_W-1:0] burst_t;
  burst_t mem [int];
  bit     ce_mark [int];
  bit     ue_mark [int];
  int     log_addr [$];
  bit     log_write [$];
  longint log_time [$];
  longint cyc = 0;

  int          state = 0;   // 0 idle, 1 write beats, 2 read wait, 3 read beats
  int          cnt = 0, beat = 0;
  int          cur_addr = 0;
  burst_t      wb;

  function automatic void mark_ce(int a); ce_mark[a] = 1; endfunction
  function automatic void mark_ue(int a); ue_mark[a] = 1; endfunction

  assign req_ready   = (state == 0);
  assign wdata_ready = (state == 1);

  initial begin rd_valid = 0; rd_data = '0; rd_ce = 0; rd_ue = 0; rd_last = 0; end

  always @(posedge clk) begin
    cyc++;
    rd_valid <= 1'b0;
    rd_last  <= 1'b0;
    rd_ce    <= 1'b0;
    rd_ue    <= 1'b0;
    case (state)
      0: if (req_valid) begin
        cur_addr = int'(req.addr);
        log_addr.push_back(cur_addr);
        log_write.push_back(req.write);
        log_time.push_back(cyc);
        beat  = 0;
        cnt   = 0;
        state = req.write ? 1 : 2;
      end
      1: if (wdata_valid) begin
        wb[beat] = wdata;
        beat++;
        if (beat == BL) begin
          mem[cur_addr] = wb;
          ce_mark.delete(cur_addr);
          ue_mark.delete(cur_addr);
          state = 0;
        end
      end
      2: begin
        cnt++;
        if (cnt == LAT) begin state = 3; beat = 0; end
      end
      3: begin
        rd_valid <= 1'b1;
        rd_data  <= mem.exists(cur_addr) ? mem[cur_addr][beat] : DATA_W'(cur_addr);
        rd_ce    <= (beat == 2) && ce_mark.exists(cur_addr);
        rd_ue    <= (beat == 2) && ue_mark.exists(cur_addr);
        rd_last  <= (beat == BL-1);
        beat++;
        if (beat == BL) state = 0;
      end
      default: state = 0;
    endcase
  end
endmodule
