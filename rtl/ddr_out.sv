// ddr_out: double-data-rate output register (one pin, two bits per clock).
//
// Both bits are taken at the rising edge of clk; d_rise is driven on the pin
// while clk is high and d_fall while clk is low, the same-edge behaviour of an
// FPGA output DDR cell. The GMII-to-RGMII converter uses one per output pin.
// This is a generic description of the cell; an FPGA build maps it to the
// vendor's DDR output primitive.
module ddr_out (
  input  logic clk,
  input  logic rst,
  input  logic d_rise,
  input  logic d_fall,
  output logic q
);

  logic r, f_pend, f;

  always_ff @(posedge clk) begin
    if (rst) begin
      r      <= 1'b0;
      f_pend <= 1'b0;
    end else begin
      r      <= d_rise;
      f_pend <= d_fall;
    end
  end

  always_ff @(negedge clk) begin
    if (rst) f <= 1'b0;
    else     f <= f_pend;
  end

  assign q = clk ? r : f;

endmodule
