// ddr_selector: per-die select, reset and power-cycle control.
//
// Every die has a point-to-point command path. This block gates each die's
// chip select and drives its reset_n and power enable, so that a single die
// can be reset or power-cycled while the others keep working (mitigation of
// functional interrupts and stuck-bit build-up). A reset request holds the
// die's reset_n low for RST_CYC cycles; a power-cycle request switches the
// die's supply off for PWR_OFF_CYC cycles, then on, then runs the same reset.
// While a die is being serviced its chip select is forced high and die_busy_o
// is set; die_done_o pulses for one cycle when it is usable again (its
// contents must then be rebuilt). One die is serviced at a time; requests for
// other dies wait until the current sequence ends.
// The per-die reset/power-cycle function is the cube description's; the
// sequence lengths and one-at-a-time servicing are this design's choices.
module ddr_selector
  import cube_pkg::*;
#(
  parameter int N_DIES      = NUM_DIES,
  parameter int RST_CYC     = 200,
  parameter int PWR_OFF_CYC = 1000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_valid_i,
  input  logic                      req_pwr_i,       // 1 = power cycle, 0 = reset
  input  logic [$clog2(N_DIES)-1:0] req_die_i,
  output logic                      req_ready_o,
  input  logic                      cs_n_i,          // controller chip select
  output logic [N_DIES-1:0]         cs_n_o,
  output logic [N_DIES-1:0]         die_reset_n_o,
  output logic [N_DIES-1:0]         die_pwr_en_o,
  output logic [N_DIES-1:0]         die_busy_o,
  output logic [N_DIES-1:0]         die_done_o
);

  typedef enum logic [1:0] {S_IDLE, S_OFF, S_RESET} state_e;
  state_e                    state;
  logic [$clog2(N_DIES)-1:0] die;
  logic [31:0]               cnt;

  assign req_ready_o = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= S_IDLE;
      die        <= '0;
      cnt        <= '0;
      die_done_o <= '0;
    end else begin
      die_done_o <= '0;
      case (state)
        S_IDLE: if (req_valid_i && 32'(req_die_i) < N_DIES) begin
          die   <= req_die_i;
          cnt   <= '0;
          state <= req_pwr_i ? S_OFF : S_RESET;
        end
        S_OFF: begin
          cnt <= cnt + 1;
          if (cnt == 32'(PWR_OFF_CYC - 1)) begin
            cnt   <= '0;
            state <= S_RESET;
          end
        end
        S_RESET: begin
          cnt <= cnt + 1;
          if (cnt == 32'(RST_CYC - 1)) begin
            state           <= S_IDLE;
            die_done_o[die] <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  always_comb begin
    die_busy_o    = '0;
    die_reset_n_o = '1;
    die_pwr_en_o  = '1;
    if (state != S_IDLE) die_busy_o[die] = 1'b1;
    if (state == S_OFF) begin
      die_pwr_en_o[die]  = 1'b0;
      die_reset_n_o[die] = 1'b0;
    end
    if (state == S_RESET) die_reset_n_o[die] = 1'b0;
    for (int d = 0; d < N_DIES; d++) cs_n_o[d] = cs_n_i | die_busy_o[d];
  end

endmodule
