// tb_aes_arbiter: two requesters share one aes_core through the arbiter.
// Each requester issues random blocks at random times, often in the same
// clock as the other, then ten rounds in which both request together. Every result is compared with the reference AES, each
// requester must get exactly one done per request and never the other's,
// and a simultaneous request must go to the requester not granted last.
module tb_aes_arbiter;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start [2], busy [2], done [2];
  logic [127:0] key [2], din [2];
  logic core_start, core_busy, core_done;
  logic [127:0] core_key, core_din, core_dout;

  aes_arbiter dut (.clk, .rst_n,
    .start_a(start[0]), .key_a(key[0]), .din_a(din[0]), .busy_a(busy[0]), .done_a(done[0]),
    .start_e(start[1]), .key_e(key[1]), .din_e(din[1]), .busy_e(busy[1]), .done_e(done[1]),
    .core_start, .core_key, .core_din, .core_busy, .core_done);
  aes_core u_aes (.clk, .rst_n, .start(core_start), .key(core_key), .din(core_din),
    .busy(core_busy), .done(core_done), .dout(core_dout));

  bit sync_mode = 0;
  int n_both = 0;
  logic last_e = 0;   // the most recent grant of any kind went to requester 1
  always @(posedge clk) if (rst_n) begin
    if (start[0] && start[1] && !core_busy) begin
      n_both++;
      checks++;
      // round robin: the requester not granted most recently must win
      if (busy[last_e] == 1'b0) begin
        failures++;
        $display("FAIL requester %0d won again", last_e);
      end
    end
    if (start[0] && !busy[0]) last_e = 0;
    if (start[1] && !busy[1]) last_e = 1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic requester(int u, int n);
    for (int i = 0; i < n; i++) begin
      blk_t k = {$urandom, $urandom, $urandom, $urandom};
      blk_t p = {$urandom, $urandom, $urandom, $urandom};
      int dones = 0;
      if (!sync_mode) repeat ($urandom % 3) @(negedge clk);
      start[u] = 1; key[u] = k; din[u] = p;
      #1;
      while (busy[u]) begin @(negedge clk); #1; end
      @(negedge clk);
      start[u] = 0; key[u] = '0; din[u] = '0;
      while (!done[u]) @(negedge clk);
      checks++;
      if (core_dout !== aes128(k, p)) begin
        failures++;
        $display("FAIL requester %0d result", u);
      end
      @(negedge clk);
    end
  endtask

  // a done must only ever go to the requester that has a call in flight
  int inflight [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      if (start[u] && !busy[u]) inflight[u]++;
      if (done[u]) begin
        checks++;
        if (inflight[u] == 0) begin
          failures++;
          $display("FAIL done to requester %0d with nothing in flight", u);
        end else inflight[u]--;
      end
    end
  end

  initial begin
    start[0] = 0; start[1] = 0; key[0] = 0; key[1] = 0; din[0] = 0; din[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      requester(0, 25);
      requester(1, 25);
    join
    // rounds in which both request in the same clock
    sync_mode = 1;
    for (int r = 0; r < 10; r++)
      fork
        requester(0, 1);
        requester(1, 1);
      join
    checks++;
    if (n_both < 10) begin failures++; $display("FAIL no simultaneous requests"); end
    $display("simultaneous requests: %0d", n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
