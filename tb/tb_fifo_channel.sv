// Self-checking testbench of fifo_channel.
//
// Random writes, reads and online-test starts are applied for several
// thousand cycles while a queue model predicts rd_data, full, empty, count and
// test_busy every cycle. The model drops writes while full, ignores reads while
// empty, ignores both for the 3*DEPTH cycles of a test, and expects the FIFO
// content to survive every test. Each event (full, empty, dropped write,
// ignored read, simultaneous read and write, operation ignored during a test,
// test run) must occur at least once. A last phase injects a stuck-at cell
// fault and checks that the channel's test reports it with the right bits and
// location.
module tb_fifo_channel;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = 3;
  localparam int unsigned CW    = 4;

  int checks = 0;
  int failures = 0;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             wr_en = 1'b0, rd_en = 1'b0, test_start = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic             full, empty, test_busy, test_done, test_fault;
  logic [CW-1:0]    count;
  logic [WIDTH-1:0] test_fault_bits;
  logic [AW-1:0]    test_fault_addr;
  logic             sa_en = 1'b0;
  logic [AW-1:0]    sa_addr = '0;
  logic [WIDTH-1:0] sa_mask = '0, sa_value = '0;

  always #5 clk = ~clk;

  fifo_channel #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] q[$];
  int busy_left = 0;
  int n_full = 0, n_empty = 0, n_drop = 0, n_ignored_rd = 0, n_both = 0;
  int n_during_test = 0, n_tests = 0, n_done = 0;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_outputs();
    expect_eq("empty", 32'(empty), 32'(q.size() == 0));
    expect_eq("full", 32'(full), 32'(q.size() == DEPTH));
    expect_eq("count", 32'(count), 32'(q.size()));
    expect_eq("test_busy", 32'(test_busy), 32'(busy_left > 0));
    if (busy_left == 0 && q.size() > 0) expect_eq("rd_data", 32'(rd_data), 32'(q[0]));
  endtask

  // advance the model over one rising edge with the inputs now applied
  task automatic step_model();
    if (busy_left > 0) begin
      if (wr_en || rd_en) n_during_test++;
      busy_left--;
    end else begin
      logic w, r;
      w = wr_en && q.size() < DEPTH;
      r = rd_en && q.size() > 0;
      if (wr_en && !w) n_drop++;
      if (rd_en && !r) n_ignored_rd++;
      if (w && r) n_both++;
      if (r) void'(q.pop_front());
      if (w) q.push_back(wr_data);
      if (test_start) begin
        busy_left = 3 * DEPTH;
        n_tests++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && test_done) n_done++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int bias;
      // phases that lean towards filling or towards draining
      bias = ((cyc / 200) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      wr_en      = ($urandom_range(99) < bias);
      rd_en      = ($urandom_range(99) >= bias);
      wr_data    = WIDTH'($urandom);
      test_start = ($urandom_range(99) < 2);
      #1;
      check_outputs();
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      step_model();
    end
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0; test_start = 1'b0;
    while (busy_left > 0) begin
      @(posedge clk);
      step_model();
      @(negedge clk);
    end

    // stuck-at fault in a cell: the next test must locate it
    sa_en = 1'b1; sa_addr = 3'd5; sa_mask = 4'b0110; sa_value = 4'b0100;
    test_start = 1'b1;
    @(negedge clk);
    test_start = 1'b0;
    repeat (3 * DEPTH) @(negedge clk);
    expect_eq("test_busy after test", 32'(test_busy), 32'd0);
    expect_eq("test_fault", 32'(test_fault), 32'd1);
    expect_eq("test_fault_bits", 32'(test_fault_bits), 32'(4'b0110));
    expect_eq("test_fault_addr", 32'(test_fault_addr), 32'd5);
    repeat (2) @(negedge clk);  // let the last done pulse be counted

    $display("events: full=%0d empty=%0d dropped_writes=%0d ignored_reads=%0d both=%0d during_test=%0d tests=%0d done=%0d",
             n_full, n_empty, n_drop, n_ignored_rd, n_both, n_during_test, n_tests, n_done);
    expect_eq("full seen", 32'(n_full > 0), 32'd1);
    expect_eq("empty seen", 32'(n_empty > 0), 32'd1);
    expect_eq("dropped write seen", 32'(n_drop > 0), 32'd1);
    expect_eq("ignored read seen", 32'(n_ignored_rd > 0), 32'd1);
    expect_eq("read and write together seen", 32'(n_both > 0), 32'd1);
    expect_eq("operation during test seen", 32'(n_during_test > 0), 32'd1);
    expect_eq("test_done pulses", 32'(n_done), 32'(n_tests + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
