// Self-checking testbench for event_fifo_bank (DEPTH = 8). Random event
// words arrive on random lanes, at most one lane of each pair per clock, and
// the four FIFOs are read at random. Each FIFO's output order must match a
// queue model fed from its two lanes. A phase with reads stopped fills the
// FIFOs so that arrivals are dropped; a last phase fires both lanes of a
// pair at once. n_dropped must count every lost word.
// Four FIFOs follow the published detector description; lane pairing and
// drop counting checked here are this design's own choices.
module tb_event_fifo_bank;
  import pc_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic [7:0] ev_valid = '0;
  event_t ev [8];
  logic [3:0] rd_en = '0, rd_valid;
  event_t rd_data [4];
  logic [31:0] n_dropped;
  int checks = 0, failures = 0;
  event_t q [4][$];
  int exp_drop = 0, n_full_drop = 0;

  event_fifo_bank #(.NFIFO(4), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  // model update and output check just before the active edge
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      automatic bit pop = rd_en[i] && q[i].size() > 0;
      checks++;
      if (rd_valid[i] != (q[i].size() > 0)) begin failures++; $display("fifo %0d valid mismatch", i); end
      if (pop) begin
        checks++;
        if (rd_data[i] !== q[i][0]) begin failures++; $display("fifo %0d data mismatch", i); end
        void'(q[i].pop_front());
      end
      if (ev_valid[2*i] && ev_valid[2*i+1]) exp_drop++;
      if (ev_valid[2*i] || ev_valid[2*i+1]) begin
        if (q[i].size() < D || pop) q[i].push_back(ev_valid[2*i] ? ev[2*i] : ev[2*i+1]);
        else begin exp_drop++; n_full_drop++; end
      end
    end
  end

  task automatic cyc(int mode);
    @(negedge clk);
    ev_valid = '0;
    for (int i = 0; i < 4; i++) begin
      int r = $urandom_range(3);
      if (mode == 2) ev_valid[2*i +: 2] = 2'b11;
      else if (r == 1) ev_valid[2*i] = 1'b1;
      else if (r == 2) ev_valid[2*i+1] = 1'b1;
    end
    for (int j = 0; j < 8; j++) ev[j] = event_t'($urandom);
    rd_en = (mode == 1) ? 4'b0000 : 4'($urandom);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) ev[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) cyc(0);
    repeat (40) cyc(1);       // no reads: FIFOs fill, arrivals dropped
    repeat (300) cyc(0);
    repeat (3) cyc(2);        // both lanes of each pair
    @(negedge clk); ev_valid = '0; rd_en = '1;
    repeat (D + 2) @(negedge clk);
    checks++;
    if (int'(n_dropped) != exp_drop) begin failures++; $display("n_dropped %0d expected %0d", n_dropped, exp_drop); end
    if (n_full_drop == 0) begin failures++; $display("no overflow happened"); end
    $display("dropped=%0d (full: %0d)", exp_drop, n_full_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
