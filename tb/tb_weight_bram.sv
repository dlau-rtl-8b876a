// tb_weight_bram - self-checking test of one weight bank: writes a pattern,
// reads it back with the one-cycle registered read, and checks that the
// output register holds its word while the read enable is low.
module tb_weight_bram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we, re;
  logic [6:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [128];

  weight_bram #(.W(16), .DEPTH(128)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      re = 1; raddr = 7'((i * 37) % 128);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[(i * 37) % 128]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", (i * 37) % 128, rdata, model[(i * 37) % 128]);
      end
      // with re low the output must hold even if the address changes
      raddr = raddr + 7'd1;
      @(negedge clk);
      checks++;
      if (rdata !== model[(i * 37) % 128]) begin
        failures++;
        $display("FAIL hold %0d", i);
      end
    end
    // simultaneous write and read of different words
    @(negedge clk);
    we = 1; waddr = 7'd3; wdata = 16'hbeef; re = 1; raddr = 7'd4;
    @(negedge clk);
    we = 0; re = 1; raddr = 7'd3;
    checks++;
    if (rdata !== model[4]) begin failures++; $display("FAIL dual-port read"); end
    @(negedge clk);
    checks++;
    if (rdata !== 16'hbeef) begin failures++; $display("FAIL dual-port write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
