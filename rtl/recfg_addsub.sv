// recfg_addsub: reconfigurable adder/subtractor, s = a + b or a - b.
//
// The circular and hyperbolic CORDIC update equations use the same operands
// and differ only in whether some of them are added or subtracted. This unit
// is the element that turns one into the other: the subtraction is done as
// a + ~b + 1, so one adder serves both and the control bit sub is the carry-in
// and the XOR mask of b. Purely combinational; a wraps modulo 2^WIDTH as a
// plain adder does.
module recfg_addsub #(
  parameter int WIDTH = 22
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,   // 1: a - b, 0: a + b
  output logic signed [WIDTH-1:0] s
);
  logic [WIDTH-1:0] b_m;

  always_comb begin
    b_m = b ^ {WIDTH{sub}};
    s   = a + $signed(b_m) + $signed({{(WIDTH-1){1'b0}}, sub});
  end
endmodule
