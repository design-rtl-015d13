// tb_cmd_dec: self-checking testbench of the serial frame decoder.
//
// Drives SPI mode 0 transfers (sdi changes while sclk is low, sampled on the
// rising edge) and records every write request the decoder issues, with the
// number of the sclk edge it came on. Checks: random frames of every command
// give exactly one request with the sent command and data on the 17th edge;
// several frames within one slave select give one request each, 17 edges
// apart; a wrong header bit gives no request and raises frame_err until the
// select is released; a transfer aborted by cs_n leaves nothing behind; a hard
// reset in the middle of a frame does the same.
module tb_cmd_dec;
  import lumi_pkg::*;

  localparam int WATCHDOG_CYCLES = 100000;

  logic    rst_n = 1'b1;
  logic    sclk  = 1'b0;
  logic    cs_n  = 1'b0;
  logic    sdi   = 1'b0;
  cmd_wr_t wr;
  logic    frame_err;

  cmd_dec dut (.rst_n, .sclk, .cs_n, .sdi, .wr, .frame_err);

  int checks   = 0;
  int failures = 0;

  // Requests seen on rising edges, and edge numbers since the last select
  int unsigned edge_no = 0;
  cmd_e        got_cmd[$];
  logic [8:0]  got_data[$];
  int unsigned got_edge[$];

  always @(posedge sclk) begin
    edge_no++;
    if (wr.valid) begin
      got_cmd.push_back(wr.cmd);
      got_data.push_back(wr.data);
      got_edge.push_back(edge_no);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_log();
    got_cmd.delete();
    got_data.delete();
    got_edge.delete();
  endtask

  task automatic select();
    cs_n = 1'b0;
    edge_no = 0;
    #5;
  endtask

  task automatic deselect();
    #5 cs_n = 1'b1;
    #10;
  endtask

  task automatic send_bit(input logic b);
    sdi = b;
    #5 sclk = 1'b1;
    #5 sclk = 1'b0;
  endtask

  task automatic send_bits(input logic [63:0] bits, input int n);
    for (int i = n - 1; i >= 0; i--) send_bit(bits[i]);
  endtask

  function automatic logic [16:0] frame(input logic [1:0] c, input logic [8:0] d);
    return {6'b101011, c, d};
  endfunction

  initial begin
    #(WATCHDOG_CYCLES * 10);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0]  c;
    logic [8:0]  d;
    logic [1:0]  cs[3];
    logic [8:0]  ds[3];
    logic [16:0] f;
    int          k;

    // drop the reset after time 0 so the asynchronous reset sees an edge
    #2 rst_n = 1'b0;
    #1 cs_n  = 1'b1;
    #10 rst_n = 1'b1;
    #10;
    check(!wr.valid && !frame_err, "idle after reset");

    // Single frames of random command and data
    for (int t = 0; t < 200; t++) begin
      c = 2'($urandom);
      d = 9'($urandom);
      clear_log();
      select();
      send_bits(64'(frame(c, d)), 17);
      check(!frame_err, "no frame error on a good frame");
      deselect();
      check(got_cmd.size() == 1, $sformatf("one request per frame (got %0d)", got_cmd.size()));
      if (got_cmd.size() == 1) begin
        check(got_cmd[0] == cmd_e'(c), $sformatf("command %b got %b", c, got_cmd[0]));
        check(got_data[0] == d, $sformatf("data %h got %h", d, got_data[0]));
        check(got_edge[0] == 17, $sformatf("request on edge 17, got %0d", got_edge[0]));
      end
    end

    // Three frames back to back within one select
    for (int t = 0; t < 20; t++) begin
      clear_log();
      select();
      for (int i = 0; i < 3; i++) begin
        cs[i] = 2'($urandom);
        ds[i] = 9'($urandom);
        send_bits(64'(frame(cs[i], ds[i])), 17);
      end
      deselect();
      check(got_cmd.size() == 3, "three requests for three frames");
      if (got_cmd.size() == 3)
        for (int i = 0; i < 3; i++) begin
          check(got_cmd[i] == cmd_e'(cs[i]) && got_data[i] == ds[i], "back-to-back frame contents");
          check(got_edge[i] == 17 * (i + 1), $sformatf("back-to-back request on edge %0d, got %0d",
                                                    17 * (i + 1), got_edge[i]));
        end
    end

    // Wrong header: one header bit flipped
    for (int t = 0; t < 60; t++) begin
      k = t % 6;
      f = frame(2'($urandom), 9'($urandom));
      f[16 - k] = ~f[16 - k];
      clear_log();
      select();
      send_bits(64'(f >> (16 - k)), k + 1);
      check(frame_err, $sformatf("frame_err after wrong header bit %0d", k));
      send_bits(64'(f), 16 - k);
      // a correct frame after a rejected one in the same select is ignored too
      send_bits(64'(frame(2'($urandom), 9'($urandom))), 17);
      check(frame_err, "frame_err holds until deselect");
      deselect();
      check(!frame_err, "frame_err cleared by deselect");
      check(got_cmd.size() == 0, "no request from a bad header");
    end

    // Transfer aborted by deselect, then a full frame
    for (int t = 0; t < 40; t++) begin
      k = 1 + t % 16;
      clear_log();
      select();
      send_bits(64'(frame(2'($urandom), 9'($urandom)) >> (17 - k)), k);
      deselect();
      c = 2'($urandom);
      d = 9'($urandom);
      select();
      send_bits(64'(frame(c, d)), 17);
      deselect();
      check(got_cmd.size() == 1 && got_cmd[0] == cmd_e'(c) && got_data[0] == d,
            $sformatf("frame after abort at bit %0d", k));
    end

    // Hard reset in the middle of a frame
    clear_log();
    select();
    send_bits(64'(frame(2'b10, 9'h155) >> 5), 12);
    rst_n = 1'b0;
    #10 rst_n = 1'b1;
    edge_no = 0;
    send_bits(64'(frame(2'b01, 9'h0AA)), 17);
    deselect();
    check(got_cmd.size() == 1 && got_cmd[0] == CMD_ACTIVE && got_data[0] == 9'h0AA,
          "frame after mid-frame reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
