// router_top: 1x5 store-and-forward packet router.
//
// One byte-wide input port receives packets (header DA, length LEN, LEN
// payload bytes; see router_pkg). The controller decodes DA[2:0] to pick one
// of five output channels, loads each accepted byte into the 8-bit input
// register, and the de-mux hands the register's byte to that channel's
// buffer. A channel shows valid_chanelN only once a whole packet is stored,
// and the receiver then pops it byte by byte with reN. err pulses for a
// packet that is dropped (bad address, bad length, or packet_valid falling
// early); suspend_data asks the source to hold its byte while the target
// channel is full.
//
// Ports, names and widths are those of the source's top-level view (63
// signal pins plus the clock). resetn is active low and asynchronous; it is
// inverted to the active-high reset that the source gives the register.
//
// Timing with no back-pressure: the first byte of an N-byte packet accepted
// at edge t makes valid_chanelN rise after edge t+N; with reN = 1 the header
// appears on ch_outN after edge t+N+1 and each further byte one clock later.
module router_top
  import router_pkg::*;
#(
  parameter int DEPTH = PKT_MAX   // bytes of buffer per output channel
) (
  input  logic  clk,
  input  logic  resetn,
  input  logic  packet_valid,
  input  byte_t data_in,
  input  logic  re1, re2, re3, re4, re5,
  output byte_t ch_out1, ch_out2, ch_out3, ch_out4, ch_out5,
  output logic  valid_chanel1, valid_chanel2, valid_chanel3, valid_chanel4, valid_chanel5,
  output logic  err,
  output logic  suspend_data
);

  localparam int CNT_W = $clog2(DEPTH + 1);

  logic             rst;
  logic             reg_en, wr, last, discard;
  sel_t             sel;
  byte_t            reg_q;
  chan_wr_t         req;
  chan_wr_t         chan_req [N_PORTS];
  logic [CNT_W-1:0] chan_free [N_PORTS];
  logic [CNT_W-1:0] sel_free;
  logic [N_PORTS-1:0] re_v, valid_v;
  byte_t            out_v [N_PORTS];

  assign rst = !resetn;

  router_ctrl #(.CNT_W(CNT_W)) u_ctrl (
    .clk, .rst, .packet_valid, .data_in,
    .free(sel_free), .reg_en, .sel, .wr, .last, .discard,
    .suspend_data, .err
  );

  router_reg #(.W(DATA_W)) u_reg (
    .clk, .rst, .en(reg_en), .d(data_in), .q(reg_q)
  );

  assign req = '{wr: wr, last: last, discard: discard, data: reg_q};

  router_demux #(.N(N_PORTS), .CNT_W(CNT_W)) u_demux (
    .sel, .req_in(req), .req_out(chan_req), .free_in(chan_free), .free_out(sel_free)
  );

  assign re_v = {re5, re4, re3, re2, re1};

  for (genvar i = 0; i < N_PORTS; i++) begin : g_chan
    router_out_chan #(.DEPTH(DEPTH), .CNT_W(CNT_W)) u_chan (
      .clk, .rst, .req(chan_req[i]), .free(chan_free[i]),
      .re(re_v[i]), .valid_chanel(valid_v[i]), .ch_out(out_v[i])
    );
  end

  assign {valid_chanel5, valid_chanel4, valid_chanel3, valid_chanel2, valid_chanel1} = valid_v;
  assign ch_out1 = out_v[0];
  assign ch_out2 = out_v[1];
  assign ch_out3 = out_v[2];
  assign ch_out4 = out_v[3];
  assign ch_out5 = out_v[4];

endmodule
