// DAC controller for one column of the analog PIM filter.
//
// The column DAC is a charge-sharing voltage charger: every clock pulse it
// receives adds one fixed charge step (about 2.34 mV) to the column's global
// bitline. To convert an input code the controller therefore emits as many
// pulses as the code is large, so the bitline voltage rises linearly with the
// code. The ramp has RES_BITS of resolution; a code above full scale is
// clipped to 2**RES_BITS-1 pulses (this clipping is a choice of this design).
//
// Interface and timing (all synchronous to clk):
//   den      loads `data` into the code register (from the main controller).
//   pen_dac  power/enable. While high, `dac_pulse` is high for one cycle per
//            remaining step; `eoc_dac` rises when all steps were sent and stays
//            high while pen_dac is high.
//   rst_dac  refresh: clears the pulse count and eoc_dac (the analog model
//            discharges the bitline on the same signal).
// A code of n takes n cycles of pen_dac before eoc_dac.
module dac_ctrl #(
  parameter int unsigned DATA_W   = 10,
  parameter int unsigned RES_BITS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              den,
  input  logic [DATA_W-1:0] data,
  input  logic              pen_dac,
  input  logic              rst_dac,
  output logic              dac_pulse,
  output logic              eoc_dac
);
  localparam logic [DATA_W-1:0] FULL = DATA_W'((1 << RES_BITS) - 1);

  logic [DATA_W-1:0] code_q, cnt_q;
  logic              busy;

  assign busy      = pen_dac && !rst_dac && (cnt_q != code_q);
  assign dac_pulse = busy;
  assign eoc_dac   = pen_dac && !rst_dac && (cnt_q == code_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (den) code_q <= (data > FULL) ? FULL : data;
      if (rst_dac)   cnt_q <= '0;
      else if (busy) cnt_q <= cnt_q + 1'b1;
    end
  end
endmodule
