// tb_addr_port_ctrl: hands requests to the port at random times and checks
// that each is driven onto the link exactly in the next token cycle, with
// `inserted` in that cycle and nothing on the link otherwise; the snoop lane
// passes through in every cycle.
module tb_addr_port_ctrl;
  import symnet_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, token, snoop_in, inserted;
  addr_req_t req, held;
  link_t link_out;
  logic pending;
  int checks = 0, failures = 0, inserts = 0;

  addr_port_ctrl dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req(req), .token(token), .snoop_in(snoop_in), .link_out(link_out),
    .inserted(inserted));

  always #5 clk = ~clk;

  initial begin
    req_valid = 1'b0; req = '0; token = 1'b0; snoop_in = 1'b0;
    pending = 1'b0; held = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      token    = (c % 6) == 2;          // token every 6 cycles
      snoop_in = 1'($urandom_range(0, 1));
      // the model: a held request goes out in the token cycle
      #1;
      checks++;
      if (inserted !== (pending && token)) begin
        failures++; $display("cycle %0d: inserted=%0b", c, inserted);
      end
      checks++;
      if (link_out.snoop !== snoop_in) begin
        failures++; $display("cycle %0d: snoop lane", c);
      end
      checks++;
      if (pending && token) begin
        if (link_out.req !== held) begin
          failures++; $display("cycle %0d: link %h expected %h", c, link_out.req, held);
        end
      end else if (link_out.req.valid !== 1'b0) begin
        failures++; $display("cycle %0d: request outside token slot", c);
      end
      checks++;
      if (req_ready !== !pending) begin
        failures++; $display("cycle %0d: ready=%0b", c, req_ready);
      end
      req_valid = 1'b0;
      if (pending && token) begin
        // the slot is used this cycle; the port is free from the next one
        pending = 1'b0; inserts++;
      end else if (!pending && $urandom_range(0, 2) == 0) begin
        // offer a new request sometimes
        req_valid = 1'b1;
        req = '0;
        req.kind = req_kind_e'($urandom_range(1, 5));
        req.src  = pid_t'($urandom);
        req.blk  = blk_t'($urandom);
        held = req; held.valid = 1'b1;
        pending = 1'b1;
      end else if (pending) begin
        req_valid = 1'($urandom_range(0, 1));  // offered while busy: must be held off
      end
    end
    checks++;
    if (inserts < 20) begin failures++; $display("only %0d insertions", inserts); end
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
