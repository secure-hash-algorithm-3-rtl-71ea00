// tb_sha3_512: the same engine built for a 512-bit digest (OUT_BITS = 512,
// rate 576 bits = 9 words, capacity 1024). Random messages of 0 to 300 bytes
// (1 to 5 blocks), with and without gaps in 'load', are padded, sent and
// their 8-word digests compared with the reference model; the empty message
// is also checked against the published SHA3-512 digest. Streaming blocks
// must still start exactly 24 cycles apart.
module tb_sha3_512;
  import keccak_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, last = 0;
  logic [63:0] din;
  logic ack, hash_valid;
  logic [63:0] hash_out;
  int checks = 0, failures = 0;
  longint cyc = 0, last_take = -1;
  int n_b2b = 0, n_digests = 0;
  logic [511:0] exp_q [$];

  sha3_top #(.OUT_BITS(512)) dut (.clk, .rst_n, .load, .din, .last, .ack, .hash_valid, .hash_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n && dut.u_ctrl.take) begin
    if (last_take >= 0 && cyc - last_take == 24) n_b2b++;
    ck(last_take < 0 || cyc - last_take >= 24, "at most one block per 24 cycles");
    last_take = cyc;
  end

  initial begin
    logic [511:0] got;
    forever begin
      @(posedge clk);
      if (rst_n && hash_valid) begin
        for (int k = 0; k < 8; k++) begin
          ck(hash_valid == 1'b1, "hash_valid held for 8 words");
          got[64 * k +: 64] = hash_out;
          @(posedge clk);
        end
        ck(hash_valid == 1'b0, "hash_valid low after 8 words");
        ck(exp_q.size() > 0 && got === exp_q.pop_front(), "digest matches reference");
        n_digests++;
      end
    end
  end

  task automatic send(bytes_t msg, int gap_pct);
    bytes_t p = pad(msg, 72);
    int nw = p.size() / 8;
    exp_q.push_back(sha3(msg, 512));
    for (int k = 0; k < nw; k++) begin
      while (gap_pct > 0 && ($urandom % 100) < gap_pct) begin
        load = 0; @(posedge clk); #1;
      end
      load = 1; din = word_of(p, k); last = (k == nw - 1);
      @(posedge clk);
      while (!ack) @(posedge clk);
      #1;
    end
    load = 0; last = 0;
  endtask

  initial begin
    bytes_t m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    m = new[0];
    ck(sha3(m, 512) == 512'h26cd1d2886857501e3d3b6959d1900f558c53a2c40e9e3114cf9f5f13a12b215a6805c47c1dcd1e05958e24f1682c9976e755a18dc67b5c8c59a3aa2cc739fa6,
       "reference model: SHA3-512 of empty string");
    send(m, 0);
    for (int n = 0; n < 10; n++) begin
      m = new[$urandom % 300];
      foreach (m[i]) m[i] = 8'($urandom);
      send(m, (n % 2) * 30);
    end
    repeat (200) @(posedge clk);
    ck(exp_q.size() == 0 && n_digests == 11, "every message produced a digest");
    ck(n_b2b > 0, "back-to-back blocks happened");
    $display("digests=%0d back_to_back=%0d", n_digests, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
