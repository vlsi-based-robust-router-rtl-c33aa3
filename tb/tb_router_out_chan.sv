// tb_router_out_chan: self-checking test of one store-and-forward channel.
// A reference model keeps the committed byte queue and the bytes of the
// packet still being written. Directed phases check that an unfinished packet
// is invisible, that the last byte commits it on that edge, that discard
// restores the free count, and that the buffer reports full. A random phase
// then mixes writes, commits, discards and reads, comparing every byte read
// and the free count with the model.
module tb_router_out_chan;
  import router_pkg::*;
  localparam int DEPTH = PKT_MAX;

  logic       clk = 1'b0;
  logic       rst;
  chan_wr_t   req;
  logic [6:0] free;
  logic       re, valid_chanel;
  byte_t      ch_out;
  int checks = 0, failures = 0;

  byte_t committed [$];
  byte_t pending   [$];

  router_out_chan #(.DEPTH(DEPTH)) dut (.clk, .rst, .req, .free, .re, .valid_chanel, .ch_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One clock: apply the request and read enable at the falling edge, let the
  // rising edge pass, update the model and check the read byte.
  task automatic step(logic w, logic l, logic dsc, byte_t dat, logic r);
    logic  pop;
    byte_t exp_b;
    @(negedge clk);
    req = '{wr: w, last: l, discard: dsc, data: dat};
    re  = r;
    #1;
    pop = r && (committed.size() != 0);
    expect_eq("valid before edge", int'(valid_chanel), int'(committed.size() != 0));
    expect_eq("free before edge", int'(free), DEPTH - committed.size() - pending.size());
    if (pop) exp_b = committed.pop_front();
    if (dsc) pending.delete();
    else if (w) begin
      pending.push_back(dat);
      if (l) begin
        foreach (pending[i]) committed.push_back(pending[i]);
        pending.delete();
      end
    end
    @(posedge clk); #1;
    if (pop) expect_eq("byte read", int'(ch_out), int'(exp_b));
  endtask

  initial begin
    rst = 1'b1; re = 1'b0;
    req = '{wr: 1'b0, last: 1'b0, discard: 1'b0, data: '0};
    #12 rst = 1'b0;

    // An unfinished packet stays invisible, the last byte commits it.
    for (int i = 0; i < 5; i++) step(1, 0, 0, byte_t'(16 + i), 0);
    expect_eq("uncommitted not valid", int'(valid_chanel), 0);
    step(1, 1, 0, 8'h1F, 0);
    expect_eq("committed valid", int'(valid_chanel), 1);
    // A second packet is discarded half way.
    for (int i = 0; i < 4; i++) step(1, 0, 0, byte_t'(32 + i), 0);
    step(0, 0, 1, 8'h00, 0);
    expect_eq("free after discard", int'(free), DEPTH - 6);
    // Drain the first packet.
    while (committed.size() != 0) step(0, 0, 0, 8'h00, 1);
    expect_eq("empty after drain", int'(valid_chanel), 0);
    // Fill the whole buffer with one packet.
    for (int i = 0; i < DEPTH; i++) step(1, i == DEPTH - 1, 0, byte_t'(i), 0);
    expect_eq("full", int'(free), 0);
    while (committed.size() != 0) step(0, 0, 0, 8'h00, 1);

    // Random traffic, never writing into a full buffer.
    for (int t = 0; t < 5000; t++) begin
      logic w, l, d, r;
      w = ($urandom_range(0, 3) != 0) && (committed.size() + pending.size() < DEPTH);
      l = w && ($urandom_range(0, 7) == 0);
      d = !w && ($urandom_range(0, 40) == 0);
      r = ($urandom_range(0, 2) != 0);
      step(w, l, d, byte_t'($urandom), r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
