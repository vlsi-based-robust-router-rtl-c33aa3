// router_reg: the router's 8-bit input register.
//
// A plain D register: it loads d on the rising clock edge when en is 1,
// keeps its value when en is 0, and is cleared to zero at once while rst is 1
// (asynchronous, active high). Its output q drives the de-mux that feeds the
// five output channels. Clock edge, active-high enable and active-high
// asynchronous reset to zero are as the source describes the register; only
// the width parameter is added.
//
// Timing: q shows d one cycle after an edge with en = 1.
module router_reg #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
