// router_demux: 1-to-N de-multiplexer between the input register and the
// output channel buffers.
//
// The incoming write request (strobes plus the registered byte) is passed to
// the channel numbered sel; every other channel sees no strobe. The data byte
// is broadcast to all channels, since a channel ignores it without a strobe.
// It also returns the free-space count of the selected channel to the
// controller. Purely combinational.
//
// The source names the de-mux and says that the register feeds it; the
// strobe set and the returned free count are this design's choice.
module router_demux
  import router_pkg::*;
#(
  parameter int N     = N_PORTS,
  parameter int CNT_W = 7
) (
  input  logic [$clog2(N)-1:0] sel,
  input  chan_wr_t             req_in,
  output chan_wr_t             req_out [N],
  input  logic [CNT_W-1:0]     free_in [N],
  output logic [CNT_W-1:0]     free_out
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_out[i]      = req_in;
      req_out[i].wr      = req_in.wr    && (sel == i[$clog2(N)-1:0]);
      req_out[i].last    = req_in.last  && (sel == i[$clog2(N)-1:0]);
      req_out[i].discard = req_in.discard && (sel == i[$clog2(N)-1:0]);
    end
    free_out = (int'(sel) < N) ? free_in[sel] : '0;
  end

endmodule
