// tb_router_top: end-to-end test of the 1x5 router at its default size.
//
// Phase 1 replays the example traffic of the reference waveform: five
// packets whose header bytes are 8'b11010000, 8'b11111011, 8'b10111010,
// 8'b11011100 and 8'b11101001, each with one payload byte, with resetn
// pulsed low between packets. It checks that each header leaves on the
// channel its DA[2:0] names (channels 1, 4, 3, 5, 2), that valid_chanel rises
// exactly three cycles (the packet length) after the header is accepted, and
// that a
// reset leaves the channel outputs holding their last byte.
//
// Phase 2 sends random traffic: good packets of 2..64 bytes to all five
// channels, back to back or with gaps, headers with an unroutable address,
// illegal lengths and packets cut short. Readers on the five channels pop
// bytes at random rates, slow enough at times to fill a channel and force
// suspend_data. A scoreboard checks every byte read against the packets
// that should have been delivered, in order, and counts err pulses against
// the packets that should have been rejected. Each mechanism must occur.
module tb_router_top;
  import router_pkg::*;

  logic  clk = 1'b0;
  logic  resetn, packet_valid;
  byte_t data_in;
  logic  re1, re2, re3, re4, re5;
  byte_t ch_out1, ch_out2, ch_out3, ch_out4, ch_out5;
  logic  valid_chanel1, valid_chanel2, valid_chanel3, valid_chanel4, valid_chanel5;
  logic  err, suspend_data;

  router_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- readers
  logic [N_PORTS-1:0] re_v, valid_v, pend;
  byte_t              out_v [N_PORTS];
  byte_t              exp_q [N_PORTS][$];
  int                 read_pct = 100;   // chance in percent that a reader pops
  int                 n_read [N_PORTS];

  assign {re5, re4, re3, re2, re1} = re_v;
  assign valid_v = {valid_chanel5, valid_chanel4, valid_chanel3, valid_chanel2, valid_chanel1};
  assign out_v   = '{ch_out1, ch_out2, ch_out3, ch_out4, ch_out5};

  initial begin
    re_v = '0; pend = '0;
    forever begin
      @(negedge clk);
      for (int i = 0; i < N_PORTS; i++) begin
        if (pend[i]) begin
          checks++;
          if (exp_q[i].size() == 0) begin
            failures++;
            $display("FAIL channel %0d delivered %h with nothing expected", i + 1, out_v[i]);
          end else begin
            byte_t e;
            e = exp_q[i].pop_front();
            if (out_v[i] != e) begin
              failures++;
              $display("FAIL channel %0d delivered %h expected %h", i + 1, out_v[i], e);
            end
          end
          n_read[i]++;
        end
        re_v[i] = ($urandom_range(1, 100) <= read_pct);
      end
      #1;
      pend = re_v & valid_v & {N_PORTS{resetn}};
    end
  end

  // ----------------------------------------------------------------- driver
  int n_stall = 0, n_bad_da = 0, n_bad_len = 0, n_cut = 0, n_zero_len = 0;
  int n_max_len = 0, n_b2b = 0, n_err = 0, n_reset = 0;
  int n_pkt [N_PORTS];
  longint t_acc;

  always @(negedge clk) if (err) n_err++;

  // Offer one byte and wait until it is accepted; returns at the falling
  // edge before the accepting rising edge.
  task automatic send_byte(byte_t b);
    @(negedge clk);
    packet_valid = 1'b1;
    data_in      = b;
    #1;
    while (suspend_data) begin
      n_stall++;
      @(negedge clk);
      #1;
    end
    t_acc = cyc + 1;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      packet_valid = 1'b0;
      data_in      = byte_t'($urandom);
    end
  endtask

  // Good packet: header, length, payload; expected on channel DA[2:0].
  task automatic send_good(int port, int len);
    byte_t pkt [$];
    pkt.push_back({5'($urandom), 3'(port)});
    pkt.push_back(byte_t'(len));
    for (int i = 0; i < len; i++) pkt.push_back(byte_t'($urandom));
    foreach (pkt[i]) send_byte(pkt[i]);
    foreach (pkt[i]) exp_q[port].push_back(pkt[i]);
    n_pkt[port]++;
    if (len == 0) n_zero_len++;
    if (len == MAX_LEN) n_max_len++;
  endtask

  task automatic wait_drained();
    int guard = 0;
    while ((valid_v != '0 || exp_q[0].size() + exp_q[1].size() + exp_q[2].size()
            + exp_q[3].size() + exp_q[4].size() != 0) && guard < 2000) begin
      @(negedge clk);
      guard++;
    end
    repeat (3) @(negedge clk);
  endtask

  localparam byte_t FIG_HDR [5] = '{8'b1101_0000, 8'b1111_1011, 8'b1011_1010,
                                    8'b1101_1100, 8'b1110_1001};
  localparam int    FIG_CH  [5] = '{1, 4, 3, 5, 2};

  initial begin
    resetn = 1'b0; packet_valid = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    resetn = 1'b1;

    // ------------------------------------------------ phase 1: figure traffic
    for (int k = 0; k < 5; k++) begin
      int ch;
      longint t0;
      byte_t pay;
      ch  = FIG_CH[k] - 1;
      pay = ~FIG_HDR[k];
      send_byte(FIG_HDR[k]);
      t0 = t_acc;
      send_byte(8'd1);
      send_byte(pay);
      exp_q[ch].push_back(FIG_HDR[k]);
      exp_q[ch].push_back(8'd1);
      exp_q[ch].push_back(pay);
      n_pkt[ch]++;
      idle(1);
      while (!valid_v[ch] && cyc < t0 + 10) @(negedge clk);
      expect_eq("packet latency (cycles)", cyc - t0, 3);
      @(negedge clk);
      expect_eq("header on figure channel", longint'(out_v[ch]), longint'(FIG_HDR[k]));
      wait_drained();
      // Reset pulse between packets, as in the reference trace.
      resetn = 1'b0;
      n_reset++;
      @(negedge clk);
      resetn = 1'b1;
      expect_eq("ch_out holds across reset", longint'(out_v[ch]), longint'(pay));
      expect_eq("no valid after reset", longint'(valid_v), 0);
    end

    // ------------------------------------------------ phase 2: random traffic
    for (int p = 0; p < 3000; p++) begin
      int kind, gap;
      if (p % 100 == 0) read_pct = (p / 100) % 2 == 0 ? 100 : 4;  // fast and slow readers
      kind = $urandom_range(0, 99);
      if (kind < 78) begin
        int len;
        len = ($urandom_range(0, 9) == 0) ? MAX_LEN : $urandom_range(0, MAX_LEN);
        send_good($urandom_range(0, N_PORTS - 1), len);
        gap = $urandom_range(0, 2);
        if (gap == 0) n_b2b++;
        idle(gap);
      end else if (kind < 86) begin
        // Unroutable address: DA[2:0] = 5, 6 or 7.
        send_byte({5'($urandom), 3'($urandom_range(N_PORTS, 7))});
        repeat ($urandom_range(0, 4)) send_byte(byte_t'($urandom));
        n_bad_da++;
        idle(1 + $urandom_range(0, 1));
      end else if (kind < 92) begin
        // Illegal length, above MAX_LEN.
        send_byte({5'($urandom), 3'($urandom_range(0, N_PORTS - 1))});
        send_byte(byte_t'($urandom_range(MAX_LEN + 1, 255)));
        repeat ($urandom_range(0, 4)) send_byte(byte_t'($urandom));
        n_bad_len++;
        idle(1 + $urandom_range(0, 1));
      end else begin
        // Packet cut short: packet_valid falls after 1..len+1 bytes.
        int len, sent;
        len  = $urandom_range(1, MAX_LEN);
        sent = $urandom_range(1, len + 1);
        send_byte({5'($urandom), 3'($urandom_range(0, N_PORTS - 1))});
        send_byte(byte_t'(len));
        for (int i = 2; i < sent; i++) send_byte(byte_t'($urandom));
        n_cut++;
        idle(1 + $urandom_range(0, 1));
      end
    end
    idle(2);
    read_pct = 100;
    wait_drained();

    for (int i = 0; i < N_PORTS; i++)
      expect_eq($sformatf("channel %0d left over bytes", i + 1), longint'(exp_q[i].size()), 0);
    begin
      int n_rejected;
      n_rejected = n_bad_da + n_bad_len + n_cut;
      expect_eq("err pulses", longint'(n_err), longint'(n_rejected));
    end

    // Every mechanism must have happened.
    begin
      int m [string];
      m["suspend_data stall"] = n_stall;
      m["unroutable address"] = n_bad_da;
      m["illegal length"]     = n_bad_len;
      m["packet cut short"]   = n_cut;
      m["zero-length packet"] = n_zero_len;
      m["maximum packet"]     = n_max_len;
      m["back-to-back"]       = n_b2b;
      m["reset pulse"]        = n_reset;
      for (int i = 0; i < N_PORTS; i++) m[$sformatf("packets to channel %0d", i + 1)] = n_pkt[i];
      foreach (m[k]) begin
        $display("  %-26s %0d", k, m[k]);
        checks++;
        if (m[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
