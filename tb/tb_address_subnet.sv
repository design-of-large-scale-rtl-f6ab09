// tb_address_subnet: eight endpoints insert requests in token order (one new
// request per cycle, several in flight). Every request must appear on all
// eight leaf outputs and on the memory tap in the same cycle, exactly
// 2*log2(8)-1 = 5 cycles after insertion (the 6th cycle counting the
// insertion cycle), in insertion order. Snoop bits driven on any leaf must
// cross with the same latency.
module tb_address_subnet;
  import symnet_pkg::*;
  localparam int unsigned N   = 8;
  localparam int unsigned LAT = 2 * $clog2(N) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  link_t lin [N];
  link_t lout [N];
  link_t mout;
  link_t sent [$];
  int checks = 0, failures = 0, delivered = 0;

  address_subnet #(.N_LEAF(N)) dut (
    .clk(clk), .rst_n(rst_n), .leaf_in(lin), .leaf_out(lout), .mem_out(mout));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) lin[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) lin[i] = '0;
      // cycle c: processor c mod N holds the token and inserts with prob 3/4
      begin
        automatic link_t l = '0;
        if ($urandom_range(0, 3) != 0) begin
          l.req.valid = 1'b1;
          l.req.kind  = req_kind_e'($urandom_range(1, 5));
          l.req.src   = pid_t'(c % N);
          l.req.blk   = blk_t'($urandom);
        end
        // an owner somewhere answers on the snoop lane
        if ($urandom_range(0, 1) == 1) lin[$urandom_range(0, N-1)].snoop = 1'b1;
        l.snoop = 1'b0;
        if (l.req.valid) lin[c % N].req = l.req;
        begin
          automatic link_t s = '0;
          s.req = l.req;
          for (int i = 0; i < N; i++) s.snoop |= lin[i].snoop;
          sent.push_back(s);
        end
      end
      // the word inserted LAT cycles ago must be on every output now
      if (sent.size() > LAT) begin
        automatic link_t e = sent.pop_front();
        for (int i = 0; i < N; i++) begin
          checks++;
          if (lout[i] !== e) begin
            failures++;
            $display("cycle %0d leaf %0d: got %h expected %h", c, i, lout[i], e);
          end
        end
        checks++;
        if (mout !== e) begin
          failures++;
          $display("cycle %0d memory: got %h expected %h", c, mout, e);
        end
        if (e.req.valid) delivered++;
      end
    end
    checks++;
    if (delivered < 100) begin
      failures++;
      $display("too few requests delivered: %0d", delivered);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
