// router_ctrl: the router controller, a four-state FSM.
//
// It watches the input port (packet_valid, data_in), decides when the input
// register loads a byte, and tells the output channel chosen by the header
// when to store, commit or discard. The states follow the packet fields:
//   S_HDR   a header is expected. DA[2:0] in 0..4 selects channel 1..5 and
//           the header is loaded; any other DA raises err and leads to S_DROP.
//   S_LEN   the length byte is expected. 0..MAX_LEN is loaded (a zero length
//           ends the packet); a larger value raises err, aborts, goes to S_DROP.
//   S_DATA  LEN payload bytes are loaded; the last one ends the packet.
//   S_DROP  bytes are consumed and thrown away until packet_valid falls.
// packet_valid frames a packet: if it falls in S_LEN or S_DATA the packet is
// incomplete, err is raised and the partly stored packet is aborted.
//
// Flow control: the register is a one-byte stage. Its byte is written into
// the selected channel as soon as the channel has a free byte (wr). A new
// byte may be loaded when the register is empty or is being emptied in the
// same cycle; otherwise suspend_data is 1 and the source must hold data_in
// and packet_valid. A byte is accepted on a rising edge with packet_valid = 1
// and suspend_data = 0. suspend_data depends only on registered state and on
// the channel's free count, never on data_in.
//
// Timing: a byte accepted at edge t is written into its channel at edge t+1
// when the channel has room; the last byte's write commits the packet.
// err is a registered one-cycle pulse per rejected packet.
//
// The source asks for an FSM controller with a reduced number of states and
// names suspend_data and err; the packet fields, the state set, and the error
// and flow-control rules above are this design's reading and choices.
module router_ctrl
  import router_pkg::*;
#(
  parameter int CNT_W = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             packet_valid,
  input  byte_t            data_in,
  input  logic [CNT_W-1:0] free,        // free bytes in the selected channel
  output logic             reg_en,      // load data_in into the input register
  output sel_t             sel,         // selected output channel, 0..N_PORTS-1
  output logic             wr,          // store the register byte in channel sel
  output logic             last,        // ...and commit the packet with it
  output logic             discard,     // discard channel sel's uncommitted bytes
  output logic             suspend_data,
  output logic             err
);

  logic       reg_full, reg_last;
  logic [5:0] cnt;                 // payload bytes still to come
  logic       wr_go, can_load, accept, err_ev;
  state_t     state, state_n;

  // wr_go ignores discard so that suspend_data does not depend on data_in;
  // an aborted byte is simply not written.
  assign wr_go        = reg_full && (free != '0);
  assign can_load     = !reg_full || wr_go;
  assign suspend_data = (state != S_DROP) && !can_load;
  assign accept       = packet_valid && !suspend_data;
  assign wr           = wr_go && !discard;
  assign last         = wr && reg_last;

  always_comb begin
    state_n = state;
    reg_en  = 1'b0;
    discard = 1'b0;
    err_ev  = 1'b0;
    unique case (state)
      S_HDR: if (accept) begin
        if (hdr_ok(data_in[2:0])) begin
          reg_en  = 1'b1;
          state_n = S_LEN;
        end else begin
          err_ev  = 1'b1;
          state_n = S_DROP;
        end
      end
      S_LEN: begin
        if (!packet_valid) begin
          discard = 1'b1; err_ev = 1'b1; state_n = S_HDR;
        end else if (accept) begin
          if (data_in > byte_t'(MAX_LEN)) begin
            discard = 1'b1; err_ev = 1'b1; state_n = S_DROP;
          end else begin
            reg_en  = 1'b1;
            state_n = (data_in == '0) ? S_HDR : S_DATA;
          end
        end
      end
      S_DATA: begin
        if (!packet_valid) begin
          discard = 1'b1; err_ev = 1'b1; state_n = S_HDR;
        end else if (accept) begin
          reg_en = 1'b1;
          if (cnt == 6'd1) state_n = S_HDR;
        end
      end
      S_DROP: if (!packet_valid) state_n = S_HDR;
      default: state_n = S_HDR;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_HDR;
      sel      <= '0;
      cnt      <= '0;
      reg_full <= 1'b0;
      reg_last <= 1'b0;
      err      <= 1'b0;
    end else begin
      state <= state_n;
      err   <= err_ev;
      if (discard)     reg_full <= 1'b0;
      else if (reg_en) reg_full <= 1'b1;
      else if (wr_go)  reg_full <= 1'b0;
      if (reg_en) begin
        unique case (state)
          S_HDR:  begin sel <= sel_t'(data_in[2:0]); reg_last <= 1'b0; end
          S_LEN:  begin cnt <= data_in[5:0]; reg_last <= (data_in == '0); end
          S_DATA: begin cnt <= cnt - 6'd1; reg_last <= (cnt == 6'd1); end
          default: ;
        endcase
      end
    end
  end

  // A write never targets a channel without room, and discard only happens
  // while a packet is open.
  a_wr_room: assert property (@(posedge clk) disable iff (rst) wr |-> free != '0);
  a_abort_open: assert property (@(posedge clk) disable iff (rst)
    discard |-> (state == S_LEN || state == S_DATA));

endmodule
