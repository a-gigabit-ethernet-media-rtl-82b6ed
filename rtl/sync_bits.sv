// sync_bits: two-flip-flop synchronizer for slowly changing signals.
//
// Carries level signals (a reset, configuration values, status flags) into
// another clock domain. A multi-bit value is safe only if it is stable for
// several destination clocks before it is used, which holds for the
// configuration registers it carries here: they are written while the
// controller is idle. RST_VAL is the output after reset.
module sync_bits #(
  parameter int unsigned   W       = 1,
  parameter logic [W-1:0]  RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] s1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1 <= RST_VAL;
      q  <= RST_VAL;
    end else begin
      s1 <= d;
      q  <= s1;
    end
  end

endmodule
