// tb_packet_queue: the asynchronous event queue between a 62.5 MHz writer
// and a 50 MHz reader. Random pushes and pops must deliver every accepted
// packet once and in order; with the reader stopped the queue must accept
// exactly DEPTH packets, report the rest as lost, and deliver the DEPTH
// accepted ones afterwards.
`timescale 1ns/1ps
module tb_packet_queue;
  localparam int W = 120, DEPTH = 16;
  logic wclk = 0, rclk = 0, rst = 1;
  always #8  wclk = ~wclk;
  always #10 rclk = ~rclk;
  logic push, full, lost, pop, empty;
  logic [W-1:0] wdata, rdata, model [$];
  packet_queue #(.W(W), .DEPTH(DEPTH)) dut (
    .wclk, .wrst(rst), .push, .wdata, .full, .lost,
    .rclk, .rrst(rst), .pop, .rdata, .empty);

  int checks = 0, failures = 0, lost_n = 0, accepted = 0, delivered = 0;
  bit reader_on = 1, writer_on = 1;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer
  int to_push = 0;
  initial begin
    push = 0; wdata = '0;
    wait (!rst);
    forever begin
      @(negedge wclk);
      push = 0;
      if (to_push > 0 && $urandom_range(0, 1)) begin
        push  = 1;
        wdata = {$urandom, $urandom, $urandom, $urandom};
        #1;
        if (full) begin
          check(lost, "lost flagged on a push while full");
          lost_n++;
        end else begin
          check(!lost, "no loss while not full");
          model.push_back(wdata);
          accepted++;
        end
        to_push--;
      end
    end
  end

  // reader
  initial begin
    pop = 0;
    wait (!rst);
    forever begin
      @(negedge rclk);
      pop = 0;
      if (reader_on && !empty && $urandom_range(0, 2) != 0) begin
        pop = 1;
        if (model.size() == 0) check(0, "data out of an empty queue");
        else check(rdata == model.pop_front(), "order and content");
        delivered++;
      end
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    rst = 0;
    to_push = 300;
    wait (to_push == 0);
    repeat (100) @(posedge rclk);
    check(delivered == accepted && model.size() == 0, "phase 1 all delivered");
    check(lost_n == 0 || accepted + lost_n == 300, "phase 1 accounting");
    // Reader stopped: exactly DEPTH accepted.
    reader_on = 0;
    begin
      automatic int acc0 = accepted, lost0 = lost_n;
      to_push = DEPTH + 5;
      wait (to_push == 0);
      check(accepted - acc0 == DEPTH, $sformatf("accepted %0d while stalled", accepted - acc0));
      check(lost_n - lost0 == 5, $sformatf("lost %0d while stalled", lost_n - lost0));
      check(full, "full while stalled");
    end
    reader_on = 1;
    repeat (200) @(posedge rclk);
    check(delivered == accepted && model.size() == 0 && empty, "phase 2 all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
