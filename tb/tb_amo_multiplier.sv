// Self-checking testbench for amo_multiplier, the micropipelined multiplier.
// A sender process offers random operand pairs with the two-phase protocol
// (toggle req_in, wait for a toggle of ack_out) after random pauses; a
// receiver process waits for each toggle of req_out, checks p against the
// product of the matching operands (in order) and toggles ack_in after a
// random pause. Slow receiver phases force the pipeline to fill up and the
// sender to stall; the testbench counts how often several items were in
// flight at once and how often the sender had to wait, and fails if either
// never happened. The latency of an item through an empty pipeline is also
// checked: six matched delays (one per stage after the first, one on the
// output request).
// A second instance, built with the other full-adder translation and the
// two-module C-element, is driven by the same handshakes and must produce
// the same acknowledges, requests and products at the same moments.
module tb_amo_multiplier;
  import mult_pkg::*;
  localparam int unsigned DLY = 3;
  localparam int ITEMS = 300;

  logic reset, req_in, ack_out, req_out, ack_in;
  logic [N-1:0]  a, b;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;
  int sent = 0, received = 0, max_inflight = 0, stalls = 0;
  logic [PW-1:0] expq [$];

  amo_multiplier #(.DELAY(DLY)) dut (.*);

  logic          ack_out2, req_out2;
  logic [PW-1:0] p2;
  int            mismatches = 0;
  amo_multiplier #(.DELAY(DLY), .FA_STYLE(0), .C_STYLE(1)) dut2 (
    .reset(reset), .req_in(req_in), .ack_out(ack_out2), .a(a), .b(b),
    .req_out(req_out2), .ack_in(ack_in), .p(p2)
  );

  always @(ack_out or ack_out2 or req_out or req_out2) begin
    #0;
    if (!reset && (ack_out !== ack_out2 || req_out !== req_out2)) mismatches++;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog: sent=%0d received=%0d c=%b%b%b%b%b%b ackin=%b reqout=%b reqin=%b", sent, received, dut.c0,dut.c1,dut.c2,dut.c3,dut.c4,dut.c5,ack_in,req_out,req_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency through the empty pipeline
  task automatic empty_latency();
    time t0;
    a = 4'd13; b = 4'd11;
    #5;
    t0 = $time;
    req_in = ~req_in;
    expq.push_back(8'd143);
    sent++;
    @(req_out);
    checks++;
    if ($time - t0 != 6 * DLY) begin
      failures++;
      $display("FAIL empty-pipeline latency %0t, expected %0d", $time - t0, 6 * DLY);
    end
  endtask

  initial begin : sender
    reset = 1'b1; req_in = 1'b0; ack_in = 1'b0; a = '0; b = '0;
    #20 reset = 1'b0;
    #20;
    empty_latency();
    wait (received == 1);
    for (int i = 1; i < ITEMS; i++) begin
      logic old_ack;
      time t0;
      #($urandom % 4);
      a = 4'($urandom);
      b = 4'($urandom);
      #1;
      old_ack = ack_out;
      expq.push_back(PW'(a) * PW'(b));
      req_in = ~req_in;
      sent++;
      if (sent - received > max_inflight) max_inflight = sent - received;
      t0 = $time;
      wait (ack_out != old_ack);
      // an acknowledge slower than one matched delay means back-pressure
      if ($time - t0 > DLY) stalls++;
    end
  end

  initial begin : receiver
    logic [PW-1:0] e;
    #30;
    forever begin
      @(req_out);
      #1;
      e = expq.pop_front();
      checks++;
      if (p !== e) begin
        failures++;
        $display("FAIL item %0d p=%0d exp=%0d", received, p, e);
      end
      checks++;
      if (p2 !== e) begin
        failures++;
        $display("FAIL second instance item %0d p=%0d exp=%0d", received, p2, e);
      end
      received++;
      if (received == ITEMS) break;
      // occasional long pauses make the pipeline fill up
      if ($urandom % 8 == 0) #(40 + $urandom % 60);
      else                   #(1 + $urandom % 3);
      ack_in = ~ack_in;
    end
    checks += 3;
    if (mismatches != 0) begin failures++; $display("FAIL handshakes of the two instances differ %0d times", mismatches); end
    if (max_inflight < 4) begin failures++; $display("FAIL pipeline never filled (%0d)", max_inflight); end
    if (stalls == 0)      begin failures++; $display("FAIL sender never stalled"); end
    $display("max in flight %0d, sender stalls %0d", max_inflight, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
