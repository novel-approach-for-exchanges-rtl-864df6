// tb_recfg_addsub: random and corner operands through the reconfigurable
// adder/subtractor; the result must equal a + b or a - b modulo 2^WIDTH.
module tb_recfg_addsub;
  localparam int WIDTH = 22;
  logic signed [WIDTH-1:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;

  recfg_addsub #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .sub(sub), .s(s));

  task automatic one(input logic signed [WIDTH-1:0] ta, input logic signed [WIDTH-1:0] tb,
                     input logic tsub);
    logic signed [WIDTH-1:0] e;
    a = ta; b = tb; sub = tsub;
    #1;
    e = tsub ? WIDTH'(longint'(ta) - longint'(tb)) : WIDTH'(longint'(ta) + longint'(tb));
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0b got %0d exp %0d", ta, tb, tsub, s, e);
    end
  endtask

  initial begin
    one(0, 0, 0); one(0, 0, 1); one(5, 3, 1); one(3, 5, 1); one(-1, 1, 0);
    one(-(1 <<< (WIDTH-1)), 1, 1); one((1 <<< (WIDTH-1)) - 1, 1, 0);
    for (int i = 0; i < 2000; i++) one(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
