// tb_y_coupler_splitter: drives an inner node and a root node with random
// collision-free traffic and checks the one-cycle merge up, the one-cycle
// copy down, and the root's turn-round.
module tb_y_coupler_splitter;
  import symnet_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  link_t a, b, dn_in, up_out, da, db;
  link_t ra, rb, rup, rda, rdb;
  link_t exp_up, exp_dn, exp_root;
  int checks = 0, failures = 0;

  y_coupler_splitter #(.IS_ROOT(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .up_a(a), .up_b(b), .up_out(up_out),
    .dn_in(dn_in), .dn_a(da), .dn_b(db));
  y_coupler_splitter #(.IS_ROOT(1'b1)) droot (
    .clk(clk), .rst_n(rst_n), .up_a(ra), .up_b(rb), .up_out(rup),
    .dn_in('0), .dn_a(rda), .dn_b(rdb));

  always #5 clk = ~clk;

  function automatic link_t rnd_link();
    link_t l = '0;
    l.req.valid = 1'b1;
    l.req.kind  = REQ_RD_MISS;
    l.req.src   = pid_t'($urandom);
    l.req.blk   = blk_t'($urandom);
    return l;
  endfunction

  task automatic check(string what, link_t got, link_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s mismatch: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a = '0; b = '0; dn_in = '0; ra = '0; rb = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      // drive: at most one request per coupler, snoop on the other side
      a = '0; b = '0; ra = '0; rb = '0;
      case ($urandom_range(0, 3))
        0: a = rnd_link();
        1: b = rnd_link();
        2: begin a = rnd_link(); b.snoop = 1'b1; a.snoop = 1'b0; end
        default: ;
      endcase
      if ($urandom_range(0, 1) == 1) ra = rnd_link(); else rb = rnd_link();
      dn_in    = rnd_link();
      exp_up   = link_t'(a | b);
      exp_dn   = dn_in;
      exp_root = link_t'(ra | rb);
      @(negedge clk);
      check("up", up_out, exp_up);
      check("down a", da, exp_dn);
      check("down b", db, exp_dn);
      check("root a", rda, exp_root);
      check("root b", rdb, exp_root);
      check("root up", rup, '0);
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
