// charge_pump: behavioural model of the charge pump that supplies the EEPROM
// programming voltage.
//
// The real part is analog; this model keeps only what the digital logic sees.
// While en is high a ramp counter runs; hv_ok rises RAMP_CYCLES clocks after
// en rises and falls in the cycle after en falls. The ramp time is this
// design's assumption. It contains no delays and is synthesizable, so the
// digital top can be built around it.
module charge_pump #(
  parameter int unsigned RAMP_CYCLES = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic hv_ok
);

  localparam int CW = $clog2(RAMP_CYCLES + 1);
  logic [CW-1:0] ramp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp  <= '0;
      hv_ok <= 1'b0;
    end else if (!en) begin
      ramp  <= '0;
      hv_ok <= 1'b0;
    end else if (ramp == CW'(RAMP_CYCLES - 1)) begin
      hv_ok <= 1'b1;
    end else begin
      ramp  <= ramp + 1'b1;
    end
  end

endmodule
