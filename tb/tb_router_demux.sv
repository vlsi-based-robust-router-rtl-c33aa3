// tb_router_demux: self-checking test of the 1-to-5 de-mux.
// For every select value and random write requests it checks that only the
// selected channel sees the strobes, that every channel sees the data byte,
// and that the selected channel's free count is returned.
module tb_router_demux;
  import router_pkg::*;
  sel_t       sel;
  chan_wr_t   req_in;
  chan_wr_t   req_out [N_PORTS];
  logic [6:0] free_in [N_PORTS];
  logic [6:0] free_out;
  int checks = 0, failures = 0;

  router_demux #(.N(N_PORTS), .CNT_W(7)) dut (.sel, .req_in, .req_out, .free_in, .free_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      sel    = sel_t'(t % N_PORTS);
      req_in = chan_wr_t'($urandom);
      for (int i = 0; i < N_PORTS; i++) free_in[i] = 7'($urandom_range(0, 64));
      #1;
      for (int i = 0; i < N_PORTS; i++) begin
        logic hit;
        hit = (i == int'(sel));
        checks++;
        if (req_out[i].wr      !== (req_in.wr && hit) ||
            req_out[i].last    !== (req_in.last && hit) ||
            req_out[i].discard !== (req_in.discard && hit) ||
            req_out[i].data    !== req_in.data) begin
          failures++;
          $display("FAIL sel=%0d ch=%0d in=%h out=%h", sel, i, req_in, req_out[i]);
        end
      end
      checks++;
      if (free_out !== free_in[sel]) begin
        failures++;
        $display("FAIL free sel=%0d got %0d expected %0d", sel, free_out, free_in[sel]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
