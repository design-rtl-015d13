// cmd_dec: serial receiver and frame decoder of the LumiMulti ADC slow-control
// interface.
//
// The link is an SPI mode 0 slave: sdi is sampled on the rising edge of sclk,
// MSB first. A frame is the 6-bit header 101011, a 2-bit command and 9 data
// bits (see lumi_pkg). A small state machine walks through the three fields
// with one bit counter:
//   S_HDR  compares each incoming bit with the expected header bit;
//   S_CMD  shifts in the command code;
//   S_DATA shifts in the data; on the last data bit the write request is
//          presented and the machine returns to S_HDR, so several frames may
//          follow each other within one slave select;
//   S_ERR  entered on the first wrong header bit; the rest of the transfer is
//          ignored until cs_n goes high.
//
// Interface and timing: wr is combinational. wr.valid is high during the
// sclk cycle whose rising edge samples the 17th bit of a frame, and wr.data
// already includes that bit (taken from sdi), so the register banks, clocked
// by the same sclk, load the new value on the very edge that completes the
// frame: no extra clock is needed after the last bit. frame_err is high from
// the edge that saw a wrong header bit until cs_n rises.
//
// The frame format and SPI mode follow the LumiMulti ADC specification. The
// slave select, its use as an asynchronous frame reset, the header error
// handling and back-to-back frames are this design's own choices.
module cmd_dec
  import lumi_pkg::*;
(
  input  logic    rst_n,      // hard reset, active low, asynchronous
  input  logic    sclk,       // serial clock
  input  logic    cs_n,       // slave select, active low
  input  logic    sdi,        // serial data in
  output cmd_wr_t wr,         // write request to the register banks
  output logic    frame_err   // header mismatch seen in this transfer
);

  typedef enum logic [1:0] {S_HDR, S_CMD, S_DATA, S_ERR} state_e;

  state_e            state;
  logic [3:0]        cnt;                  // bit index within the field
  cmd_e              cmd_q;
  logic [DATA_W-2:0] data_q;               // all data bits but the last

  logic             frame_rst_n;
  logic             last_bit;
  logic [HDR_W-1:0] hdr_exp;               // header, current bit at the MSB

  // A high slave select clears the frame state without needing sclk edges.
  assign frame_rst_n = rst_n & ~cs_n;
  assign last_bit    = (state == S_DATA) && (cnt == 4'(DATA_W - 1));
  assign hdr_exp     = HEADER << cnt;

  always_ff @(posedge sclk or negedge frame_rst_n) begin
    if (!frame_rst_n) begin
      state  <= S_HDR;
      cnt    <= '0;
      cmd_q  <= CMD_CONFIG;
      data_q <= '0;
    end else begin
      unique case (state)
        S_HDR: begin
          if (sdi != hdr_exp[HDR_W-1]) begin
            state <= S_ERR;
            cnt   <= '0;
          end else if (cnt == 4'(HDR_W - 1)) begin
            state <= S_CMD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        S_CMD: begin
          cmd_q <= cmd_e'({cmd_q[0], sdi});
          if (cnt == 4'(CMD_W - 1)) begin
            state <= S_DATA;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        S_DATA: begin
          data_q <= {data_q[DATA_W-3:0], sdi};
          if (last_bit) begin
            state <= S_HDR;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        S_ERR: begin
          state <= S_ERR;
        end
      endcase
    end
  end

  always_comb begin
    wr.valid = last_bit;
    wr.cmd   = cmd_q;
    wr.data  = {data_q, sdi};
  end

  assign frame_err = (state == S_ERR);

  // The counter never leaves the range of the field it is walking through.
  logic cnt_ok;
  always_comb begin
    unique case (state)
      S_HDR:   cnt_ok = cnt < 4'(HDR_W);
      S_CMD:   cnt_ok = cnt < 4'(CMD_W);
      S_DATA:  cnt_ok = cnt < 4'(DATA_W);
      default: cnt_ok = cnt == '0;
    endcase
  end

  a_cnt_range: assert property (@(posedge sclk) disable iff (!frame_rst_n) cnt_ok);

  // A write request only comes from the data field of a selected transfer.
  a_wr_in_frame: assert property (@(posedge sclk)
    wr.valid |-> (state == S_DATA) && !cs_n && rst_n);

endmodule
