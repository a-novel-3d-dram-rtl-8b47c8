// refresh_ctrl: variable-rate auto-refresh (CAS-before-RAS) request generator.
//
// A counter runs up to the programmable interval interval_i (in controller
// cycles; T_REFI = 7.8 us by default). Each time it expires one refresh
// becomes owed. Owed refreshes are requested with ref_req_o and retired by
// ref_ack_i when the command FSM has issued REF. Up to MAX_OWED refreshes may
// be postponed, as DDR3 allows eight; urgent_o is raised at that limit, when
// the FSM must refresh before any other command. Lowering the interval raises
// the rate, to follow retention changes with temperature and ageing or to
// counter row-hammer. A zero interval is treated as 1.
// The variable rate is the cube description's; postponing and the urgent flag
// are this design's choices.
module refresh_ctrl #(
  parameter int CNT_W    = 16,
  parameter int MAX_OWED = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] interval_i,
  input  logic             ref_ack_i,
  output logic             ref_req_o,
  output logic             urgent_o,
  output logic [3:0]       owed_o
);

  logic [CNT_W-1:0] cnt;
  logic             tick;

  assign tick = (cnt >= interval_i - 1'b1) || interval_i == '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      owed_o <= '0;
    end else begin
      cnt <= tick ? '0 : cnt + 1'b1;
      case ({tick && owed_o != 4'(MAX_OWED), ref_ack_i && owed_o != '0})
        2'b10:   owed_o <= owed_o + 1'b1;
        2'b01:   owed_o <= owed_o - 1'b1;
        default: ;
      endcase
    end

  assign ref_req_o = (owed_o != '0);
  assign urgent_o  = (owed_o == 4'(MAX_OWED));

endmodule
