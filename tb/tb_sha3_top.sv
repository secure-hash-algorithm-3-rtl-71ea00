// tb_sha3_top: end-to-end test of the SHA3-256 engine at its default
// parameters.
//
// A driver pads byte messages (SHA-3 pad10*1, domain bits 01), sends them as
// 64-bit little-endian lane words with 'last' on the final word, and a monitor
// collects the 4 digest words of each message and compares them with the
// reference model in keccak_ref_pkg, and for "" and "abc" also with the
// published SHA3-256 digests. Phases: known answers; random messages of 0 to
// 400 bytes (1 to 3 blocks) with random gaps in 'load'; a stream of
// back-to-back blocks with 'load' held high.
// Timing checks: a block costs exactly 24 cycles when blocks stream (time
// between consecutive block starts), and the first digest word of a message
// appears 25 cycles after its last word was accepted when the core was idle;
// hash_valid stays high for exactly 4 cycles per digest.
// Mechanisms counted (each must happen): back-pressure (load high, ack low),
// back-to-back block starts, multi-block messages, squeezes followed by a new
// message on a cleared state, idle periods.
module tb_sha3_top;
  import keccak_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, last = 0;
  logic [63:0] din;
  logic ack, hash_valid;
  logic [63:0] hash_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sha3_top dut (.clk, .rst_n, .load, .din, .last, .ack, .hash_valid, .hash_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- expected digests and monitor ----------------
  logic [255:0] exp_q [$];
  longint       lastword_q [$];   // cycle of the final word, -1 if core was busy
  int  n_digests = 0, n_backpressure = 0, n_b2b = 0, n_multiblock = 0;
  int  n_idle = 0, n_after_squeeze = 0, n_latency = 0;
  longint last_take = -1;

  always @(posedge clk) if (rst_n) begin
    if (load && !ack) n_backpressure++;
    if (!dut.u_ctrl.busy && !dut.blk_full) n_idle++;
    if (dut.u_ctrl.take) begin
      if (last_take >= 0 && cyc - last_take == 24) n_b2b++;
      ck(last_take < 0 || cyc - last_take >= 24, "at most one block per 24 cycles");
      last_take = cyc;
    end
  end

  initial begin
    logic [255:0] got, exp_d;
    longint lw, t0;
    forever begin
      @(posedge clk);
      if (rst_n && hash_valid) begin
        t0 = cyc;
        for (int k = 0; k < 4; k++) begin
          ck(hash_valid == 1'b1, "hash_valid held for 4 words");
          got[64 * k +: 64] = hash_out;
          @(posedge clk);
        end
        ck(hash_valid == 1'b0, "hash_valid low after 4 words");
        if (exp_q.size() == 0) begin
          ck(0, "unexpected digest");
        end else begin
          exp_d = exp_q.pop_front();
          lw = lastword_q.pop_front();
          ck(got === exp_d, "digest matches reference");
          if (got !== exp_d) $display("  got %h\n  exp %h", got, exp_d);
          if (lw >= 0) begin
            ck(t0 - lw == 25, "latency 25 cycles from last word");
            if (t0 - lw != 25) $display("  latency %0d", t0 - lw);
            n_latency++;
          end
        end
        n_digests++;
      end
    end
  end

  // ---------------- driver ----------------
  function automatic bytes_t str2bytes(string s);
    bytes_t b = new[s.len()];
    foreach (b[i]) b[i] = s[i];
    return b;
  endfunction

  task automatic send(bytes_t msg, int gap_pct);
    bytes_t p = pad(msg, 136);
    int nw = p.size() / 8;
    bit idle_core;
    exp_q.push_back(sha3(msg, 256));
    if (nw > 17) n_multiblock++;
    for (int k = 0; k < nw; k++) begin
      while (gap_pct > 0 && ($urandom % 100) < gap_pct) begin
        load = 0; @(posedge clk); #1;
      end
      load = 1; din = word_of(p, k); last = (k == nw - 1);
      idle_core = !dut.u_ctrl.busy && !dut.blk_full;
      @(posedge clk);
      while (!ack) @(posedge clk);   // ack sampled at this edge (set before it)
      #1;
    end
    // latency is only defined when the last word found the core idle
    lastword_q.push_back(idle_core ? cyc : -1);
    load = 0; last = 0;
  endtask

  initial begin
    bytes_t m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // known answers
    ck(sha3(str2bytes(""), 256)[255:0] ==
       256'h4a43f8804b0ad882fa493be44dff80f562d661a05647c15166d71ebff8c6ffa7,
       "reference model: SHA3-256 of empty string");
    send(str2bytes(""), 0);
    repeat (40) @(posedge clk); #1;
    ck(sha3(str2bytes("abc"), 256)[255:0] ==
       256'h3215431145e2bf465b529d3e6e085f85bd90d36b2d175c04b225e24fa75d983a,
       "reference model: SHA3-256 of abc");
    send(str2bytes("abc"), 0);
    repeat (40) @(posedge clk); #1;

    // random messages, random load gaps
    for (int n = 0; n < 12; n++) begin
      m = new[$urandom % 400];
      foreach (m[i]) m[i] = 8'($urandom);
      send(m, (n % 3) * 20);
      if (n % 4 == 3) begin repeat (30) @(posedge clk); #1; end
    end

    // streaming: load held high, one-block and multi-block messages back to back
    for (int n = 0; n < 8; n++) begin
      m = new[(n % 2) ? 200 : 100];
      foreach (m[i]) m[i] = 8'($urandom);
      send(m, 0);
    end

    repeat (200) @(posedge clk);
    ck(exp_q.size() == 0, "every message produced a digest");
    ck(n_digests == 22, "22 digests");
    ck(n_backpressure > 0, "back-pressure happened");
    ck(n_b2b > 0, "back-to-back blocks at 24 cycles happened");
    ck(n_multiblock > 0, "multi-block messages happened");
    ck(n_idle > 0, "idle periods happened");
    ck(n_latency > 0, "latency measured");
    $display("digests=%0d backpressure_cycles=%0d back_to_back=%0d multiblock=%0d latency_checks=%0d",
             n_digests, n_backpressure, n_b2b, n_multiblock, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
