// End-to-end testbench for ppl_actel_top at its default parameters.
//
// Synchronous side: clk runs with period 20 and a fresh random operand pair
// is applied one time unit after every rising edge; each product must appear
// on smo_p exactly five periods after its operands were captured. The two
// clock phases brought out of the top are watched at every change and must
// never be high together.
// Asynchronous side, run at the same time: a sender and a receiver use the
// two-phase request/acknowledge ports with random pauses; products must
// arrive in order and correct. The receiver's occasional long pauses make
// the pipeline fill (several items in flight) and make the sender stall on
// the acknowledge. A reset is applied again in the middle of the run with
// the pipeline empty, and traffic must resume after it.
// Each mechanism (synchronous product stream, phase non-overlap, pipeline
// fill, sender stall, mid-run reset) is counted, and one that never happened
// is a failure.
module tb_ppl_actel_top;
  import mult_pkg::*;
  localparam int ITEMS = 200;
  localparam int DLY = 2;           // default matched delay of the top

  logic clk;
  logic [N-1:0]  smo_a, smo_b, amo_a, amo_b;
  logic [PW-1:0] smo_p, amo_p;
  logic phi0, phi1;
  logic amo_reset, amo_req_in, amo_ack_out, amo_req_out, amo_ack_in;

  int checks = 0, failures = 0;
  int smo_products = 0, overlaps = 0, phase_checks = 0;
  int sent = 0, received = 0, max_inflight = 0, stalls = 0, resets = 0;
  bit smo_done = 0, amo_done = 0;
  logic [PW-1:0] smo_q [$];
  logic [PW-1:0] amo_q [$];

  ppl_actel_top dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog: smo=%0d sent=%0d received=%0d", smo_products, sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phases must never overlap
  always @(phi0 or phi1) begin
    #0;
    phase_checks++;
    if (phi0 && phi1) overlaps++;
  end

  // ---------------- synchronous multiplier ----------------
  initial begin : smo_drive
    logic [PW-1:0] e;
    clk = 1'b0; smo_a = '0; smo_b = '0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      #10 clk = 1'b1;
      smo_q.push_back(PW'(smo_a) * PW'(smo_b));
      #1;
      if (smo_q.size() == 6) begin
        e = smo_q.pop_front();
        checks++;
        smo_products++;
        if (smo_p !== e) begin
          failures++;
          $display("FAIL smo cycle %0d p=%0d exp=%0d", cyc, smo_p, e);
        end
      end
      smo_a = 4'($urandom);
      smo_b = 4'($urandom);
      #9 clk = 1'b0;
    end
    smo_done = 1;
  end

  // ---------------- asynchronous multiplier ----------------
  task automatic send(logic [N-1:0] x, logic [N-1:0] y);
    logic old_ack;
    time t0;
    amo_a = x;
    amo_b = y;
    #1;
    old_ack = amo_ack_out;
    amo_q.push_back(PW'(x) * PW'(y));
    amo_req_in = ~amo_req_in;
    sent++;
    if (sent - received > max_inflight) max_inflight = sent - received;
    t0 = $time;
    wait (amo_ack_out != old_ack);
    // an acknowledge slower than one matched delay means back-pressure
    if ($time - t0 > DLY) stalls++;
  endtask

  initial begin : amo_sender
    amo_reset = 1'b1; amo_req_in = 1'b0; amo_ack_in = 1'b0; amo_a = '0; amo_b = '0;
    #20 amo_reset = 1'b0;
    #10;
    for (int i = 0; i < ITEMS; i++) begin
      if (i == ITEMS / 2) begin
        // drain, then reset the control again with all handshakes at rest
        wait (received == sent);
        #10;
        amo_reset = 1'b1;
        amo_req_in = 1'b0;
        amo_ack_in = 1'b0;
        #10 amo_reset = 1'b0;
        resets++;
        checks++;
        if (amo_ack_out !== 1'b0) begin failures++; $display("FAIL reset left ack_out high"); end
        #10;
      end
      #($urandom % 4);
      send(4'($urandom), 4'($urandom));
    end
  end

  initial begin : amo_receiver
    logic [PW-1:0] e;
    #25;
    forever begin
      @(amo_req_out);
      if (amo_reset) continue;       // the handshake wires return to rest
      #1;
      e = amo_q.pop_front();
      checks++;
      if (amo_p !== e) begin
        failures++;
        $display("FAIL amo item %0d p=%0d exp=%0d", received, amo_p, e);
      end
      if ($urandom % 6 == 0) #(30 + $urandom % 50);
      else                   #(1 + $urandom % 3);
      received++;
      amo_ack_in = ~amo_ack_in;
      if (received == ITEMS) break;
    end
    amo_done = 1;
  end

  initial begin : finish
    wait (smo_done && amo_done);
    #50;
    checks += 6;
    if (smo_products < 100) begin failures++; $display("FAIL too few synchronous products"); end
    if (phase_checks == 0)  begin failures++; $display("FAIL phases never changed"); end
    if (overlaps != 0)      begin failures++; $display("FAIL phases overlapped %0d times", overlaps); end
    if (max_inflight < 4)   begin failures++; $display("FAIL async pipeline never filled"); end
    if (stalls == 0)        begin failures++; $display("FAIL async sender never stalled"); end
    if (resets == 0)        begin failures++; $display("FAIL no mid-run reset"); end
    $display("smo products %0d, phase changes %0d, async items %0d, max in flight %0d, stalls %0d, resets %0d",
             smo_products, phase_checks, received, max_inflight, stalls, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
