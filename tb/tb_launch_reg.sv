// tb_launch_reg: self-checking test of the launch register.
//
// Runs a 670 ps launch clock. Checks that reset clears the register
// (asynchronously, between edges), that every rising edge loads the operand
// pair and valid flag present before it, and that the value holds between
// edges while the input keeps changing.
module tb_launch_reg;
  import wavepro_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic      clk, rst_n;
  operands_t d, q;
  int checks = 0, failures = 0;

  launch_reg dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    clk = 1'b0;
    forever #335 clk = ~clk;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic operands_t rand_ops();
    operands_t o;
    o.valid = 1'($urandom);
    o.a     = {$urandom, $urandom};
    o.b     = {$urandom, $urandom};
    return o;
  endfunction

  task automatic check(operands_t exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("%s: q=%h exp=%h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    operands_t sent;
    rst_n = 1'b0;
    d = rand_ops();
    #2000;
    check('0, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      #100;                      // change the input away from either edge
      sent = rand_ops();
      d = sent;
      @(posedge clk);
      #50;
      check(sent, "load");
      d = rand_ops();            // input moves, output must hold
      #200;
      check(sent, "hold");
      if (n == 250) begin        // asynchronous reset between edges
        rst_n = 1'b0;
        #20;
        check('0, "async reset");
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
