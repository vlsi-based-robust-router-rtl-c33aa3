// router_out_chan: one output channel of the router, a store-and-forward
// packet buffer.
//
// The buffer is a circular RAM of DEPTH bytes with three pointers: the write
// pointer (bytes stored so far), the commit pointer (end of the last complete
// packet) and the read pointer. A packet is written byte by byte; when its
// last byte is written (wr and last together) the commit pointer jumps to the
// write pointer, and only then do the packet's bytes become visible to the
// reader. A discard strobe moves the write pointer back to the commit pointer,
// discarding a packet that was cut short or found illegal. So a reader never
// sees part of a packet: valid_chanel rises only for whole packets.
//
// Interface:
//   req          write request from the de-mux (wr, last, discard, data).
//   free         free bytes in the buffer, counting uncommitted bytes as used.
//   re           read enable from the receiver on this channel.
//   valid_chanel committed bytes are waiting to be read.
//   ch_out       byte read out; updated on the edge after a cycle with
//                re = 1 and valid_chanel = 1, held otherwise.
//
// Timing: a packet whose last byte is written at edge t shows valid_chanel
// from edge t on; with re held high its bytes appear on ch_out one per clock
// from edge t+1. rst is asynchronous and active high; it empties the buffer.
// ch_out is not reset: it keeps the last byte read, as the reference
// waveform shows the outputs holding their values across reset pulses and
// undefined before the first byte arrives.
//
// The source gives the channel's names (re, valid_chanel, ch_out) and
// store-and-forward flow control. The buffer depth, the commit/discard
// mechanism and the read timing are this design's choices. DEPTH defaults to
// one packet of the largest size the source allows (64 bytes).
module router_out_chan
  import router_pkg::*;
#(
  parameter int DEPTH = PKT_MAX,
  parameter int CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  chan_wr_t         req,
  output logic [CNT_W-1:0] free,
  input  logic             re,
  output logic             valid_chanel,
  output byte_t            ch_out
);

  localparam int AW = $clog2(DEPTH);

  byte_t mem [DEPTH];

  // Pointers carry one extra bit so that full and empty differ.
  logic [AW:0] wr_ptr, cm_ptr, rd_ptr;
  logic [AW:0] used;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] ptr_inc(logic [AW:0] p);
    logic [AW:0] n;
    if (p[AW-1:0] == AW'(DEPTH - 1)) n = {~p[AW], {AW{1'b0}}};
    else                             n = p + 1'b1;
    return n;
  endfunction

  function automatic logic [AW:0] ptr_dist(logic [AW:0] a, logic [AW:0] b);
    // Number of entries from b up to a.
    logic [AW:0] d;
    if (a[AW] == b[AW]) d = a - b;
    else                d = (AW+1)'(DEPTH) - ({1'b0, b[AW-1:0]} - {1'b0, a[AW-1:0]});
    return d;
  endfunction

  assign used         = ptr_dist(wr_ptr, rd_ptr);
  assign free         = CNT_W'(DEPTH) - CNT_W'(used);
  assign valid_chanel = (cm_ptr != rd_ptr);
  assign do_wr        = req.wr && !req.discard && (free != '0);
  assign do_rd        = re && valid_chanel;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= req.data;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      cm_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (req.discard) begin
        wr_ptr <= cm_ptr;
      end else if (do_wr) begin
        wr_ptr <= ptr_inc(wr_ptr);
        if (req.last) cm_ptr <= ptr_inc(wr_ptr);
      end
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
    end
  end

  // The output byte register has no reset: a reset empties the buffer but
  // leaves the last byte read on ch_out.
  always_ff @(posedge clk) begin
    if (do_rd) ch_out <= mem[rd_ptr[AW-1:0]];
  end

  // The controller only writes when the channel has room.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    req.wr && !req.discard |-> free != '0);

endmodule
