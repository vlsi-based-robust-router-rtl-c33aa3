// tb_router_reg: self-checking test of the 8-bit input register.
// Drives random data and enable values and checks q against a model after
// every rising edge: load when en = 1, hold when en = 0. Also asserts the
// asynchronous reset between clock edges and checks that q clears at once.
module tb_router_reg;
  logic       clk = 1'b0;
  logic       rst, en;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  router_reg #(.W(8)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; d = 8'h00;
    #12;
    check("reset", 8'h00);
    rst = 1'b0;
    model = 8'h00;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = 8'($urandom);
      if (en) model = d;
      @(posedge clk); #1;
      check(en ? "load" : "hold", model);
      if (i % 97 == 50) begin
        // Asynchronous reset in the middle of the low clock phase.
        #2 rst = 1'b1; #1;
        check("async reset", 8'h00);
        model = 8'h00;
        @(negedge clk); en = 1'b1; d = 8'hA5;
        @(posedge clk); #1;
        check("load under reset", 8'h00);
        rst = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
