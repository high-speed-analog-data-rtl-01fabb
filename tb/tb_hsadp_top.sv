// tb_hsadp_top: end-to-end test of the analog data port at its default
// parameters, through complete block transfers.
//
// The control-room multiplexer model scans 108 channels after every beam
// pulse (360 pps, six interleaved beams). Playing the part of the PDP-9
// program, the bench waits for the pulse of a chosen beam, loads the memory
// address counter and the word counter (minus the word count) with IOTs and
// waits for the program interrupt. The DM09A model, whose disk port takes
// priority and requests memory cycles at random, writes each word to memory.
//
// Checks: every stored word equals the code predicted from the channel
// voltage (amplifier 2.5 + v/2, 8-bit quantisation of 0..5 V) and is within
// 1 % of full scale of it; the words land at consecutive addresses and none
// outside the block; each word reaches memory before the next strobe 8 us
// later, disk stalls included, so the port keeps pace; all 108 words of
// a beam are in memory within one 2.7 ms interpulse period; the interrupt,
// WCOF, IORS status bit and skip behave; the clear IOT drops the interrupt.
// It also counts each mechanism and fails if one never happened: sample
// conversions, data-channel transfers, disk-priority stalls, strobes ignored
// while no transfer was enabled, word-count overflows, IORS reads, skips
// taken and not taken, flag clears.
`timescale 1ns/1ps
module tb_hsadp_top;
  import hsadp_pkg::*;

  localparam logic [5:0] DEV = 6'o55;

  logic     clk = 0, rst_n = 0;
  real      analog;
  logic     strobe, beam_pulse;
  logic [2:0] beam_id;
  logic [6:0] channel;
  io_bus_t  io;
  logic     io_skip, pi_req, xfer_en, wcof, busy;
  logic [17:0] io_status;
  dma_req_t dma;
  logic     dma_ack;
  logic [14:0] word_count;
  logic     disk_req, disk_ack;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ccr_mux_model mux (.clk(clk), .rst_n(rst_n), .analog(analog), .strobe(strobe),
                     .beam_pulse(beam_pulse), .beam_id(beam_id), .channel(channel));

  hsadp_top dut (
    .clk(clk), .rst_n(rst_n), .analog_in(analog), .sample_strobe(strobe),
    .io(io), .io_skip(io_skip), .io_status(io_status), .pi_req(pi_req),
    .dma(dma), .dma_ack(dma_ack), .xfer_en(xfer_en), .wcof(wcof),
    .word_count(word_count), .digitizer_busy(busy));

  dm09a_model dm (.clk(clk), .rst_n(rst_n), .disk_req(disk_req), .disk_ack(disk_ack),
                  .an_req(dma.req), .an_addr(dma.addr), .an_data(dma.data), .an_ack(dma_ack));

  // ---- the disk: random bursts of 1..4 memory cycles ----------------------
  int disk_left = 0;
  always @(posedge clk) begin
    if (disk_ack && disk_left > 0) disk_left <= disk_left - 1;
    if (disk_left == 0 && ($urandom % 200) == 0) disk_left <= 1 + $urandom % 4;
  end
  assign disk_req = disk_left > 0;

  // ---- mechanism counters -------------------------------------------------
  int n_conv = 0, n_xfer = 0, n_ignored = 0, n_ovf = 0, n_iors = 0;
  int n_skip = 0, n_noskip = 0, n_clear = 0;
  logic req_d = 0, wcof_d = 0;
  int strobe_cyc[$];
  always @(posedge clk) begin
    req_d  <= dma.req;
    wcof_d <= wcof;
    if (rst_n) begin
      if (dma.req && !req_d) n_conv++;
      if (dma_ack) n_xfer++;
      if (strobe && !xfer_en) n_ignored++;
      if (wcof && !wcof_d) n_ovf++;
      if (strobe && xfer_en) strobe_cyc.push_back(cyc);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ---- PDP-9 program side -------------------------------------------------
  task automatic iot(input logic [1:0] sub, input bit p1, p2, p4, input logic [17:0] ac);
    @(negedge clk);
    io.dev = DEV; io.sub = sub; io.data = ac;
    io.iop1 = p1; io.iop2 = p2; io.iop4 = p4;
    @(negedge clk);
    io.iop1 = 0; io.iop2 = 0; io.iop4 = 0; io.dev = '0;
  endtask

  task automatic skip_test(output bit skipped);
    @(negedge clk);
    io.dev = DEV; io.sub = SUB_CTRL; io.iop1 = 1;
    #1 skipped = io_skip;
    @(negedge clk);
    io.iop1 = 0; io.dev = '0;
    if (skipped) n_skip++; else n_noskip++;
  endtask

  task automatic iors_read(output logic [17:0] st);
    @(negedge clk);
    io.iors = 1;
    #1 st = io_status;
    @(negedge clk);
    io.iors = 0;
    n_iors++;
  endtask

  function automatic real volts(input int beam, input int ch);
    return -5.0 + 10.0 * real'((ch * 37 + beam * 101 + 13) % 250) / 250.0 + 0.01;
  endfunction

  function automatic int expected_code(input real v);
    real a;
    int c;
    a = 2.5 + v / 2.0;
    c = int'($floor(a * 256.0 / 5.0));
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return c;
  endfunction

  // One block transfer of nwords words from the chosen beam to address base.
  task automatic run_block(input int beam, input int nwords, input logic [14:0] base);
    bit sk;
    logic [17:0] st;
    int t_pulse, t_done, xfer0;
    xfer0 = n_xfer;
    strobe_cyc.delete();
    // wait for the chosen beam's pulse
    do @(posedge clk); while (!(beam_pulse && beam_id == 3'(beam)));
    @(posedge clk);
    t_pulse = cyc;
    skip_test(sk);
    check(!sk, "skip taken before the transfer finished");
    iot(SUB_CTRL, 0, 0, 1, 18'(base));
    iot(SUB_WC,   0, 0, 1, 18'(15'(-nwords)));
    @(negedge clk);
    check(xfer_en, "transfer not enabled by W.C. load");
    // wait for the interrupt
    while (!pi_req) @(posedge clk);
    t_done = cyc;
    check(wcof, "WCOF not set at the interrupt");
    check(!xfer_en, "transfer still enabled after overflow");
    check(word_count == 0, "word counter not zero at the end");
    check(dma.addr == 15'(base + nwords), "MAC not advanced by the word count");
    check(n_xfer - xfer0 == nwords, $sformatf("transfers %0d, want %0d", n_xfer - xfer0, nwords));
    check((t_done - t_pulse) * 100 <= 2700000,
          $sformatf("block took %0d us, longer than one interpulse period", (t_done - t_pulse) / 10));
    // stored words
    for (int i = 0; i < nwords; i++) begin
      real v;
      int  got;
      v   = volts(beam, i);
      got = int'(dm.mem[15'(base + i)]);
      check(got == expected_code(v),
            $sformatf("beam %0d ch %0d: stored %0d want %0d", beam, i, got, expected_code(v)));
      check((got * 10.0 / 256.0 - 5.0 - v) < 0.1 && (v - (got * 10.0 / 256.0 - 5.0)) < 0.1,
            "sample error above 1 % of full scale");
    end
    check(dm.mem[15'(base - 1)] == 18'o777777, "word written below the block");
    check(dm.mem[15'(base + nwords)] == 18'o777777, "word written past the block");
    // program side: IORS, skip, clear
    iors_read(st);
    check(st[6] == 1'b1, "IORS does not show Done");
    skip_test(sk);
    check(sk, "skip on Done not taken");
    iot(SUB_CTRL, 0, 1, 0, '0);
    n_clear++;
    @(negedge clk);
    check(!pi_req && !wcof, "clear IOT did not drop the interrupt");
    iors_read(st);
    check(st == '0, "IORS still shows Done after clear");
    $display("beam %0d: %0d words in %0d us, disk stalls so far %0d clocks",
             beam, nwords, (t_done - t_pulse) / 10, dm.stalls);
  endtask

  // ---- per-word latency and spacing ---------------------------------------
  int last_ack = -1, max_lat = 0;
  always @(posedge clk) begin
    if (rst_n && dma_ack && strobe_cyc.size() > 0) begin
      int lat;
      lat = cyc - strobe_cyc.pop_front();
      if (lat > max_lat) max_lat = lat;
      // each word must be in memory before the next strobe, 8 us later
      checks++;
      if (lat >= 80) begin
        failures++;
        $display("FAIL word stored %0d clocks after its strobe", lat);
      end
    end
  end

  initial begin
    repeat (80_000_000 / 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    io = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    run_block(2, 108, 15'o10000);
    run_block(5, 40,  15'o20000);
    run_block(0, 108, 15'o30000);
    $display("max strobe-to-memory latency %0d clocks", max_lat);
    $display("conversions=%0d transfers=%0d stall_clocks=%0d ignored_strobes=%0d overflows=%0d iors=%0d skips=%0d noskips=%0d clears=%0d",
             n_conv, n_xfer, dm.stalls, n_ignored, n_ovf, n_iors, n_skip, n_noskip, n_clear);
    check(n_conv == 256, "conversions");
    check(n_xfer == 256, "transfers");
    check(dm.stalls > 0, "disk priority never stalled the port");
    check(n_ignored > 0, "no strobe was ignored while disabled");
    check(n_ovf == 3, "word-count overflows");
    check(n_iors > 0 && n_skip > 0 && n_noskip > 0 && n_clear > 0, "program-side mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
