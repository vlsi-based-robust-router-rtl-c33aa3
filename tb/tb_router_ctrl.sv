// tb_router_ctrl: self-checking test of the router controller FSM.
// The channel free count is driven by the testbench. Directed packets check,
// cycle by cycle, the register load, write, commit and discard strobes, the
// selected channel, suspend_data and err for: a good packet, a header with an
// unroutable address, an illegal length, a packet cut short, a zero-length
// packet, and a full channel that forces suspension.
module tb_router_ctrl;
  import router_pkg::*;
  logic       clk = 1'b0;
  logic       rst, packet_valid;
  byte_t      data_in;
  logic [6:0] free;
  logic       reg_en, wr, last, discard, suspend_data, err;
  sel_t       sel;
  int checks = 0, failures = 0;

  router_ctrl #(.CNT_W(7)) dut (.clk, .rst, .packet_valid, .data_in, .free,
    .reg_en, .sel, .wr, .last, .discard, .suspend_data, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Strobes seen just before the coming rising edge.
  logic s_en, s_wr, s_last, s_dsc, s_sus;

  task automatic cyc(logic pv, byte_t d);
    @(negedge clk);
    packet_valid = pv;
    data_in      = d;
    #1;
    s_en = reg_en; s_wr = wr; s_last = last; s_dsc = discard; s_sus = suspend_data;
  endtask

  task automatic expect_cyc(string what, logic en, logic w, logic l, logic dsc, logic sus);
    expect_eq({what, " reg_en"},  int'(s_en),   int'(en));
    expect_eq({what, " wr"},      int'(s_wr),   int'(w));
    expect_eq({what, " last"},    int'(s_last), int'(l));
    expect_eq({what, " discard"}, int'(s_dsc),  int'(dsc));
    expect_eq({what, " suspend"}, int'(s_sus),  int'(sus));
  endtask

  initial begin
    rst = 1'b1; packet_valid = 1'b0; data_in = '0; free = 7'd64;
    #12 rst = 1'b0;

    // A: good packet to channel 3 (DA[2:0] = 2), three payload bytes.
    cyc(1, 8'h0A); expect_cyc("A hdr", 1, 0, 0, 0, 0);
    cyc(1, 8'd3);  expect_cyc("A len", 1, 1, 0, 0, 0);
    expect_eq("A sel", int'(sel), 2);
    cyc(1, 8'h11); expect_cyc("A d0", 1, 1, 0, 0, 0);
    cyc(1, 8'h22); expect_cyc("A d1", 1, 1, 0, 0, 0);
    cyc(1, 8'h33); expect_cyc("A d2", 1, 1, 0, 0, 0);
    cyc(0, 8'h00); expect_cyc("A commit", 0, 1, 1, 0, 0);
    cyc(0, 8'h00); expect_cyc("A idle", 0, 0, 0, 0, 0);
    expect_eq("A err", int'(err), 0);

    // B: unroutable header (DA[2:0] = 6) is dropped with err.
    cyc(1, 8'hF6); expect_cyc("B hdr", 0, 0, 0, 0, 0);
    cyc(1, 8'h05); expect_cyc("B drop1", 0, 0, 0, 0, 0);
    expect_eq("B err pulse", int'(err), 1);
    cyc(1, 8'h44); expect_cyc("B drop2", 0, 0, 0, 0, 0);
    expect_eq("B err one cycle", int'(err), 0);
    cyc(0, 8'h00);
    // Back in the header state: a good header loads again.
    cyc(1, 8'h01); expect_cyc("B next hdr", 1, 0, 0, 0, 0);
    expect_eq("B sel unchanged", int'(sel), 2);

    // C: length 63 is illegal: discard plus err, then drop.
    cyc(1, 8'd63); expect_cyc("C len", 0, 0, 0, 1, 0);
    expect_eq("C sel", int'(sel), 1);
    cyc(1, 8'h00); expect_cyc("C drop", 0, 0, 0, 0, 0);
    expect_eq("C err", int'(err), 1);
    cyc(0, 8'h00);

    // D: packet_valid falls after two of five payload bytes.
    cyc(1, 8'h04); expect_cyc("D hdr", 1, 0, 0, 0, 0);
    cyc(1, 8'd5);  expect_cyc("D len", 1, 1, 0, 0, 0);
    expect_eq("D sel", int'(sel), 4);
    cyc(1, 8'hA0); expect_cyc("D d0", 1, 1, 0, 0, 0);
    cyc(1, 8'hA1); expect_cyc("D d1", 1, 1, 0, 0, 0);
    cyc(0, 8'h00); expect_cyc("D cut", 0, 0, 0, 1, 0);
    cyc(0, 8'h00); expect_cyc("D idle", 0, 0, 0, 0, 0);
    expect_eq("D err", int'(err), 1);

    // E: zero-length packet commits with its length byte.
    cyc(1, 8'hD0); expect_cyc("E hdr", 1, 0, 0, 0, 0);
    cyc(1, 8'd0);  expect_cyc("E len", 1, 1, 0, 0, 0);
    expect_eq("E sel", int'(sel), 0);
    cyc(0, 8'h00); expect_cyc("E commit", 0, 1, 1, 0, 0);

    // F: the selected channel is full: suspend_data until it has room.
    @(posedge clk) #1 free = 7'd0;
    cyc(1, 8'h03); expect_cyc("F hdr", 1, 0, 0, 0, 0);
    for (int i = 0; i < 4; i++) begin
      cyc(1, 8'd1); expect_cyc("F held", 0, 0, 0, 0, 1);
    end
    @(posedge clk) #1 free = 7'd2;
    cyc(1, 8'd1);  expect_cyc("F len", 1, 1, 0, 0, 0);
    cyc(1, 8'h77); expect_cyc("F d0", 1, 1, 0, 0, 0);
    @(posedge clk) #1 free = 7'd0;
    cyc(0, 8'h00); expect_cyc("F last held", 0, 0, 0, 0, 1);
    @(posedge clk) #1 free = 7'd1;
    cyc(0, 8'h00); expect_cyc("F commit", 0, 1, 1, 0, 0);
    expect_eq("F no err", int'(err), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
