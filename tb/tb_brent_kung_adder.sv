// tb_brent_kung_adder - self-checking test of the Brent-Kung adder.
// Checks a 40-bit and a 13-bit (non power of two) instance against the
// built-in + operator on corner operands and random operands, with and
// without carry in, including the carry out.
module tb_brent_kung_adder;
  int checks = 0, failures = 0;

  logic [39:0] a40, b40, s40;
  logic        ci40, co40;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  brent_kung_adder #(.W(40)) dut40 (.a(a40), .b(b40), .cin(ci40), .sum(s40), .cout(co40));
  brent_kung_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check40(logic [39:0] a, logic [39:0] b, logic ci);
    logic [40:0] ref_s;
    a40 = a; b40 = b; ci40 = ci;
    #1;
    ref_s = {1'b0, a} + {1'b0, b} + 41'(ci);
    checks++;
    if ({co40, s40} !== ref_s) begin
      failures++;
      $display("FAIL W=40 %h + %h + %0d: got %h expected %h", a, b, ci, {co40, s40}, ref_s);
    end
  endtask

  task automatic check13(logic [12:0] a, logic [12:0] b, logic ci);
    logic [13:0] ref_s;
    a13 = a; b13 = b; ci13 = ci;
    #1;
    ref_s = {1'b0, a} + {1'b0, b} + 14'(ci);
    checks++;
    if ({co13, s13} !== ref_s) begin
      failures++;
      $display("FAIL W=13 %h + %h + %0d: got %h expected %h", a, b, ci, {co13, s13}, ref_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check40('0, '0, 0);
    check40('1, 40'd1, 0);
    check40('1, '0, 1);
    check40('1, '1, 1);
    check40(40'h55_5555_5555, 40'haa_aaaa_aaaa, 1);
    check40(40'h80_0000_0000, 40'h80_0000_0000, 0);
    for (int i = 0; i < 40; i++) check40(40'd1 << i, (40'd1 << i) - 1, 1);
    for (int i = 0; i < 2000; i++)
      check40(40'({$urandom, $urandom}), 40'({$urandom, $urandom}), 1'($urandom));
    check13('1, 13'd1, 0);
    check13('1, '1, 1);
    for (int i = 0; i < 2000; i++) check13(13'($urandom), 13'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
