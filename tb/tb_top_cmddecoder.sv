// tb_top_cmddecoder: end-to-end testbench of the LumiMulti ADC command
// decoder, at its default parameters.
//
// Acts as the SPI mode 0 master: sdi changes while sclk is low and the
// decoder samples it on the rising edge. It sends a random mix of commands
// and keeps its own model of every configuration output. After each frame it
// compares all outputs with the model, and it also checks that nothing changes
// before the 17th rising edge of a frame and that the new value is there right
// after it. The mix includes frames with a wrong header, transfers cut short by
// releasing cs_n, several frames in one select, config frames with the
// undefined mode code, all three read-out modes and hard resets. Each of these
// is counted, and a mechanism that never occurred counts as a failure.
module tb_top_cmddecoder;

  localparam int WATCHDOG_CYCLES = 200000;
  localparam int N_TRANSFERS     = 600;

  logic       rst_n = 1'b1;
  logic       sclk  = 1'b0;
  logic       cs_n  = 1'b0;
  logic       sdi   = 1'b0;
  logic [1:0] mode;
  logic [2:0] test_adc;
  logic       lvds_lp, buf_lp;
  logic [7:0] adc_on;
  logic [8:0] dac0, dac1;
  logic       frame_err;

  top_cmddecoder dut (
    .rst_n, .sclk, .cs_n, .sdi,
    .mode, .test_adc, .lvds_lp, .buf_lp, .adc_on, .dac0, .dac1, .frame_err
  );

  int checks   = 0;
  int failures = 0;

  // Model of the configuration
  logic [1:0] m_mode;
  logic [2:0] m_test_adc;
  logic       m_lvds_lp, m_buf_lp;
  logic [7:0] m_adc_on;
  logic [8:0] m_dac0, m_dac1;

  // Mechanism counters
  int n_cmd[4];
  int n_mode[3];
  int n_rsvd, n_hdr_err, n_abort, n_b2b, n_reset;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic model_reset();
    m_mode = 2'b00; m_test_adc = 3'd0; m_lvds_lp = 1'b0; m_buf_lp = 1'b0;
    m_adc_on = 8'hFF; m_dac0 = 9'h100; m_dac1 = 9'h100;
  endtask

  function automatic logic [32:0] outputs();
    return {mode, test_adc, lvds_lp, buf_lp, adc_on, dac0, dac1};
  endfunction

  function automatic logic [32:0] model();
    return {m_mode, m_test_adc, m_lvds_lp, m_buf_lp, m_adc_on, m_dac0, m_dac1};
  endfunction

  task automatic check_all(input string where);
    check(outputs() == model(), $sformatf("%s: outputs %h, expected %h", where, outputs(), model()));
  endtask

  // Apply a command to the model, as the specification defines it
  task automatic model_apply(input logic [1:0] c, input logic [8:0] d);
    n_cmd[c]++;
    unique case (c)
      2'b00:
        if (d[8:7] == 2'b11) n_rsvd++;
        else begin
          m_mode = d[8:7]; m_test_adc = d[6:4]; m_lvds_lp = d[3]; m_buf_lp = d[2];
          n_mode[d[8:7]]++;
        end
      2'b01: for (int i = 0; i < 8; i++) m_adc_on[7 - i] = d[8 - i];  // first bit: ADC7
      2'b10: m_dac0 = d;
      2'b11: m_dac1 = d;
    endcase
  endtask

  task automatic send_bit(input logic b);
    sdi = b;
    #5 sclk = 1'b1;
    #5 sclk = 1'b0;
  endtask

  // One complete frame, checking the 17-edge latency
  task automatic send_frame(input logic [1:0] c, input logic [8:0] d);
    logic [16:0] f;
    logic [32:0] prev_out;
    f = {6'b101011, c, d};
    prev_out = outputs();
    for (int i = 16; i >= 0; i--) begin
      if (i == 0) check(outputs() == prev_out, "no output changes before the 17th edge");
      send_bit(f[i]);
    end
    model_apply(c, d);
    check_all("after the 17th edge");
  endtask

  function automatic logic [8:0] random_data(input logic [1:0] c);
    logic [8:0] d;
    d = 9'($urandom);
    if (c == 2'b00) begin
      d[1:0] = 2'b00;
      if ($urandom % 8 == 0) d[8:7] = 2'b11;
      else d[8:7] = 2'($urandom % 3);
    end
    if (c == 2'b01) d[0] = 1'b0;
    return d;
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
    logic [16:0] f;
    int          k, kind;

    // hard reset; released slave select
    #2 rst_n = 1'b0;
    #1 cs_n = 1'b1;
    #10 rst_n = 1'b1;
    #10;
    model_reset();
    check_all("after hard reset");
    check(!frame_err, "no frame error after reset");

    for (int t = 0; t < N_TRANSFERS; t++) begin
      kind = $urandom % 20;
      cs_n = 1'b0;
      #5;
      if (kind < 12) begin
        // one frame
        c = 2'($urandom);
        send_frame(c, random_data(c));
      end else if (kind < 15) begin
        // several frames in one select
        for (int i = 0; i < 2 + $urandom % 3; i++) begin
          c = 2'($urandom);
          send_frame(c, random_data(c));
        end
        n_b2b++;
      end else if (kind < 17) begin
        // a wrong header bit, followed by a good frame in the same select
        c = 2'($urandom);
        f = {6'b101011, c, random_data(c)};
        k = $urandom % 6;
        f[16 - k] = ~f[16 - k];
        for (int i = 16; i >= 0; i--) send_bit(f[i]);
        c = 2'($urandom);
        f = {6'b101011, c, random_data(c)};
        for (int i = 16; i >= 0; i--) send_bit(f[i]);
        check(frame_err, "frame_err raised by a wrong header");
        check_all("rejected transfer changes nothing");
        n_hdr_err++;
      end else if (kind < 19) begin
        // transfer cut short by releasing the select
        c = 2'($urandom);
        f = {6'b101011, c, random_data(c)};
        k = 1 + $urandom % 16;
        for (int i = 16; i > 16 - k; i--) send_bit(f[i]);
        check_all("aborted transfer changes nothing");
        n_abort++;
      end else begin
        // hard reset while selected, in the middle of a frame
        f = {6'b101011, 2'($urandom), 9'($urandom)};
        for (int i = 16; i > 8; i--) send_bit(f[i]);
        rst_n = 1'b0;
        #2;
        model_reset();
        check_all("hard reset");
        rst_n = 1'b1;
        #3;
        c = 2'($urandom);
        send_frame(c, random_data(c));
        n_reset++;
      end
      #5 cs_n = 1'b1;
      #5;
      check(!frame_err, "frame_err clear while deselected");
      #5;
    end

    $display("commands: config %0d, active-adc %0d, dac0 %0d, dac1 %0d",
             n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3]);
    $display("modes set: parallel %0d, test %0d, serial %0d; reserved mode ignored %0d",
             n_mode[0], n_mode[1], n_mode[2], n_rsvd);
    $display("header errors %0d, aborted transfers %0d, multi-frame selects %0d, resets %0d",
             n_hdr_err, n_abort, n_b2b, n_reset);
    for (int i = 0; i < 4; i++) check(n_cmd[i] > 0, $sformatf("command %0d exercised", i));
    for (int i = 0; i < 3; i++) check(n_mode[i] > 0, $sformatf("mode %0d exercised", i));
    check(n_rsvd > 0, "reserved mode exercised");
    check(n_hdr_err > 0, "header error exercised");
    check(n_abort > 0, "abort exercised");
    check(n_b2b > 0, "multi-frame select exercised");
    check(n_reset > 0, "mid-frame reset exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
