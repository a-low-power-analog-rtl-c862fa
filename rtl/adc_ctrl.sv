// Single-slope ADC controller with offset calibration, one per PIM row.
//
// The ADC compares the row's MAV output voltage with a voltage charger that
// rises by one step per clock pulse. The controller counts the pulses it
// sends until the comparator reports that the charger has reached the MAV
// voltage; that count is the conversion result. The count stops at full
// scale, 2**RES_BITS-1.
//
// Calibration: with `cal` high during a conversion the inputs are expected
// to be zero, so the count measures the comparator/capacitor offset of the
// row; it is stored in the offset register. Later conversions subtract it
// (floored at 0). How the calibration logic works inside is not published;
// this zero-input measurement is this design's choice.
//
// Interface and timing:
//   pen_adc  enable; one cycle after it rises `bias`
//            (comparator on) rises with the charger at zero. Each later cycle
//            either stops (cmp high or full scale) or sends one `chg_pulse`.
//   cmp      comparator output from the analog core (charger >= MAV).
//   eoc_adc  high from the end of conversion while pen_adc stays high.
//   yout     result, held until the next conversion ends.
//   rst_adc  refresh: clears the count and eoc_adc, not yout or the offset.
// A result of n raises eoc_adc n+3 cycles after pen_adc rises.
module adc_ctrl #(
  parameter int unsigned DATA_W   = 10,
  parameter int unsigned RES_BITS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pen_adc,
  input  logic              rst_adc,
  input  logic              cal,
  input  logic              cmp,
  output logic              bias,
  output logic              chg_pulse,
  output logic              eoc_adc,
  output logic [DATA_W-1:0] yout,
  output logic [DATA_W-1:0] offset
);
  localparam logic [DATA_W-1:0] FULL = DATA_W'((1 << RES_BITS) - 1);

  typedef enum logic [1:0] {A_IDLE, A_BIAS, A_CONV, A_DONE} state_e;
  state_e state_q;

  logic [DATA_W-1:0] cnt_q;
  logic              stop;

  assign stop      = (state_q == A_CONV) && (cmp || cnt_q == FULL);
  assign chg_pulse = (state_q == A_CONV) && !stop && pen_adc && !rst_adc;
  assign bias      = (state_q == A_BIAS) || (state_q == A_CONV);
  assign eoc_adc   = (state_q == A_DONE) && pen_adc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= A_IDLE;
      cnt_q   <= '0;
      yout    <= '0;
      offset  <= '0;
    end else if (rst_adc || !pen_adc) begin
      state_q <= A_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        A_IDLE: state_q <= A_BIAS;
        A_BIAS: state_q <= A_CONV;
        A_CONV: begin
          if (stop) begin
            state_q <= A_DONE;
            if (cal) begin
              offset <= cnt_q;
              yout   <= '0;
            end else begin
              yout <= (cnt_q > offset) ? cnt_q - offset : '0;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        A_DONE: ;
        default: state_q <= A_IDLE;
      endcase
    end
  end
endmodule
