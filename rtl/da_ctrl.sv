// da_ctrl: sequencer of the distributed-arithmetic PID controller.
//
// A `start` pulse in DA_IDLE begins one control period:
//   DA_IDLE  : adc_load   - load a[n] into the ADC-side PSR, clear its accumulator
//   DA_ADC   : adc_shift  - N_ADC clocks, one bit of a[n] per clock -> P
//   DA_ERRLD : err_load   - form e[n], load the three error PSRs, clear accumulator
//   DA_ERR   : err_shift  - N_ERR clocks, one bit of each error per clock;
//              err_sign marks the last (sign) bit, which is subtracted -> E
//   DA_UPD   : update     - u[n] = u[n-1] + E, shift the error history; done
// so a period takes N_ADC + N_ERR + 3 clocks from the start pulse to the
// done pulse, and u[n] is on the output the clock after done. start is
// ignored while busy. The document gives the bit-serial passes (n clocks on
// the ADC side, B clocks for the error side); the state split, the extra
// load and update clocks and the handshake are this design's own.
module da_ctrl
  import pid_pkg::*;
#(
  parameter int unsigned N_ADC = ADC_W,
  parameter int unsigned N_ERR = E_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic adc_load,
  output logic adc_shift,
  output logic err_load,
  output logic err_shift,
  output logic err_sign,
  output logic update,
  output logic busy,
  output logic done
);

  localparam int unsigned CW = $clog2((N_ADC > N_ERR ? N_ADC : N_ERR) + 1);

  da_state_e     state, state_nx;
  logic [CW-1:0] cnt;

  always_comb begin
    state_nx = state;
    unique case (state)
      DA_IDLE:  if (start) state_nx = DA_ADC;
      DA_ADC:   if (cnt == CW'(N_ADC - 1)) state_nx = DA_ERRLD;
      DA_ERRLD: state_nx = DA_ERR;
      DA_ERR:   if (cnt == CW'(N_ERR - 1)) state_nx = DA_UPD;
      DA_UPD:   state_nx = DA_IDLE;
      default:  state_nx = DA_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= DA_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_nx;
      cnt   <= (state_nx != state) ? '0 : cnt + 1'b1;
    end
  end

  assign adc_load  = (state == DA_IDLE) && start;
  assign adc_shift = (state == DA_ADC);
  assign err_load  = (state == DA_ERRLD);
  assign err_shift = (state == DA_ERR);
  assign err_sign  = (state == DA_ERR) && (cnt == CW'(N_ERR - 1));
  assign update    = (state == DA_UPD);
  assign done      = update;
  assign busy      = (state != DA_IDLE);

endmodule
