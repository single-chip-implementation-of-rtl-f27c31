// tb_sha1_serial_top: end-to-end test of the serial SHA-1 core at its default size.
//
// Hashes the standard "abc" and empty-message vectors, messages of every length
// 0..447 with random contents, and messages under random initial hash values,
// comparing each digest with the reference model. It checks the 81-cycle
// latency from start to done and the 82-cycle operation period, that a start is
// ignored while busy, and that an over-long length raises len_error and is
// refused. Each mechanism (load of the initial hash, the four round functions
// and constants, final addition, refused start, start while busy) is counted and
// must occur at least once.
module tb_sha1_serial_top;
  import sha1_ref_pkg::*;
  import sha1_pkg::*;

  logic         clk = 0, rst_n = 1, start = 0;
  logic [447:0] msg;
  logic [8:0]   msg_len;
  hash_t        init_hash;
  logic         busy, len_error, done;
  hash_t        digest;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_load = 0, n_add = 0, n_refused = 0, n_busy_start = 0;
  int n_round [4] = '{0, 0, 0, 0};
  int last_load = -1, load_gap = -1;

  sha1_serial_top dut (.clk, .rst_n, .start, .msg, .msg_len, .init_hash,
                       .busy, .len_error, .done, .digest);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters, observed on the internal control signals.
  always @(posedge clk) begin
    if (dut.load) begin
      n_load++;
      load_gap  = (last_load < 0) ? -1 : cycle - last_load;
      last_load = cycle;
    end
    if (dut.add)  n_add++;
    if (dut.step) n_round[int'(dut.u_f.sel)]++;
    if (start && len_error && !busy) n_refused++;
    if (start && busy) n_busy_start++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One operation; returns the digest. Checks latency and the expected value.
  task automatic run(input logic [447:0] m, input int len, input logic [159:0] iv,
                     input logic [159:0] expected, input bit hold_start);
    int t0;
    @(negedge clk);
    msg = m; msg_len = 9'(len); init_hash = iv; start = 1;
    @(negedge clk);
    t0 = cycle;   // edges counted up to and including the start edge
    if (!hold_start) start = 0;
    // scramble the inputs: they must have been captured at start
    msg = rand_msg(); init_hash = {5{32'($urandom)}};
    check(busy, "busy after start");
    while (!done) begin
      @(negedge clk);
      if (cycle - t0 > 200) break;
    end
    start = 0;
    check(cycle - t0 == 81, $sformatf("latency %0d, expected 81", cycle - t0));
    check(digest == expected, $sformatf("len %0d digest %h expected %h", len, digest, expected));
    @(negedge clk);
    check(!done && !busy, "done is one cycle and core idle");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    msg = '0; msg_len = '0; init_hash = SHA1_IV;
    #2 rst_n = 0; #21 rst_n = 1;

    // NIST one-block vector "abc"
    run({24'h616263, 424'h0}, 24, SHA1_IV, 160'ha9993e364706816aba3e25717850c26c9cd0d89d, 0);
    // empty message
    run('0, 0, SHA1_IV, 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, 0);
    // start held high through the operation: must not restart it
    run({24'h616263, 424'h0}, 24, SHA1_IV, 160'ha9993e364706816aba3e25717850c26c9cd0d89d, 1);

    // start held high: back-to-back operations, one every 82 cycles
    @(negedge clk);
    msg = {24'h616263, 424'h0}; msg_len = 9'd24; init_hash = SHA1_IV; start = 1;
    @(negedge clk);
    last_load = -1;
    repeat (2) begin
      while (!done) @(negedge clk);
      check(digest == 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "back-to-back digest");
      @(negedge clk);
    end
    check(load_gap == 82, $sformatf("operation period %0d, expected 82", load_gap));
    start = 0;
    repeat (90) @(negedge clk);

    // over-long length refused
    @(negedge clk);
    msg_len = 9'd448; start = 1;
    #1 check(len_error, "len_error for 448 bits");
    @(negedge clk);
    check(!busy, "448-bit start refused");
    msg_len = 9'd511;
    #1 check(len_error, "len_error for 511 bits");
    @(negedge clk); start = 0;
    check(!busy, "511-bit start refused");

    // every length
    for (int len = 0; len <= 447; len += 1) begin
      logic [447:0] m;
      m = rand_msg();
      run(m, len, SHA1_IV, ref_hash(SHA1_IV, m, len), 0);
    end

    // random initial hash input
    for (int n = 0; n < 40; n++) begin
      logic [447:0] m;
      logic [159:0] iv;
      int len;
      m = rand_msg(); len = $urandom_range(0, 447);
      iv = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      run(m, len, iv, ref_hash(iv, m, len), 0);
    end

    check(n_load > 0, "load of initial hash never happened");
    check(n_add > 0, "final addition never happened");
    check(n_refused > 0, "refused start never happened");
    check(n_busy_start > 0, "start while busy never happened");
    for (int r = 0; r < 4; r++) begin
      check(n_round[r] > 0, $sformatf("round function %0d never used", r + 1));
      check(n_round[r] == 20 * n_load, $sformatf("round %0d used %0d times", r + 1, n_round[r]));
    end
    $display("mechanisms: load=%0d add=%0d refused=%0d start_while_busy=%0d rounds=%0d/%0d/%0d/%0d",
             n_load, n_add, n_refused, n_busy_start,
             n_round[0], n_round[1], n_round[2], n_round[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
