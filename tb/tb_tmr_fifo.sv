// End-to-end testbench of tmr_fifo at its default size (4-bit words, 8 deep).
//
// Four phases of random writes, reads and online-test starts, each after a
// reset: no fault, then a stuck-at cell fault in copy C (the voter's case 1),
// in copy A and in copy B (case 2). A queue model predicts the voted rd_data,
// full, empty, count and test_busy every cycle; because the voter must mask a
// single faulty copy, the prediction is the same in every phase. At the end
// of every online test the per-copy fault report must name exactly the faulty
// copy, with the stuck bits and location. Each mechanism (full, empty, dropped
// write, ignored read, online test, fault located by the test, a corrupted
// word masked by the voter in each case) is counted and must happen at least
// once.
module tb_tmr_fifo;

  import ftf_pkg::*;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = 3;
  localparam int unsigned CW    = 4;

  int checks = 0;
  int failures = 0;

  logic                             clk = 1'b0;
  logic                             rst_n = 1'b0;
  logic                             wr_en = 1'b0, rd_en = 1'b0, test_start = 1'b0;
  logic [WIDTH-1:0]                 wr_data = '0, rd_data;
  logic                             full, empty, test_busy, test_done;
  logic [CW-1:0]                    count;
  logic [NUM_COPIES-1:0]            test_fault;
  logic [NUM_COPIES-1:0][WIDTH-1:0] test_fault_bits;
  logic [NUM_COPIES-1:0][AW-1:0]    test_fault_addr;
  logic [NUM_COPIES-1:0]            sa_en = '0;
  logic [AW-1:0]                    sa_addr = '0;
  logic [WIDTH-1:0]                 sa_mask = '0, sa_value = '0;

  always #5 clk = ~clk;

  tmr_fifo dut (.*);

  typedef struct packed {
    logic [WIDTH-1:0] data;
    logic             corrupted;  // one copy stored a wrong value for this word
  } entry_t;

  entry_t q[$];
  int wr_idx = 0;
  int busy_left = 0;
  int n_full = 0, n_empty = 0, n_drop = 0, n_ignored_rd = 0, n_tests = 0, n_located = 0;
  int n_masked [NUM_COPIES];

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
    if (busy_left == 0 && q.size() > 0) expect_eq("rd_data", 32'(rd_data), 32'(q[0].data));
  endtask

  task automatic step_model();
    if (busy_left > 0) begin
      busy_left--;
    end else begin
      logic w, r;
      w = wr_en && q.size() < DEPTH;
      r = rd_en && q.size() > 0;
      if (wr_en && !w) n_drop++;
      if (rd_en && !r) n_ignored_rd++;
      if (r) begin
        entry_t e;
        e = q.pop_front();
        // a word one copy stored wrongly has just been read out correctly
        if (e.corrupted) begin
          for (int k = 0; k < NUM_COPIES; k++) if (sa_en[k]) n_masked[k]++;
        end
      end
      if (w) begin
        entry_t e;
        e.data = wr_data;
        e.corrupted = (sa_en != '0) && AW'(wr_idx) == sa_addr &&
                      (((wr_data ^ sa_value) & sa_mask) != '0);
        q.push_back(e);
        wr_idx = (wr_idx + 1) % DEPTH;
      end
      if (test_start) begin
        busy_left = 3 * DEPTH;
        n_tests++;
      end
    end
  endtask

  // at the end of every test, only the faulty copy reports a fault
  always @(posedge clk) begin
    if (rst_n && test_done) begin
      for (int k = 0; k < NUM_COPIES; k++) begin
        expect_eq("test_fault", 32'(test_fault[k]), 32'(sa_en[k]));
        if (sa_en[k]) begin
          expect_eq("test_fault_bits", 32'(test_fault_bits[k]), 32'(sa_mask));
          expect_eq("test_fault_addr", 32'(test_fault_addr[k]), 32'(sa_addr));
          if (test_fault[k]) n_located++;
        end
      end
    end
  end

  task automatic run_phase(input string name, input logic [NUM_COPIES-1:0] faulty, input int cycles);
    @(negedge clk);
    rst_n = 1'b0;
    wr_en = 1'b0; rd_en = 1'b0; test_start = 1'b0;
    q.delete();
    wr_idx = 0;
    busy_left = 0;
    sa_en = faulty;
    sa_addr = AW'($urandom);
    sa_mask = WIDTH'($urandom_range(1, (1 << WIDTH) - 1));
    sa_value = WIDTH'($urandom);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < cycles; cyc++) begin
      int bias;
      bias = ((cyc / 150) % 2 == 0) ? 70 : 30;
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
    // let a running test finish so that its report is checked
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0; test_start = 1'b0;
    while (busy_left > 0) begin
      @(posedge clk);
      step_model();
      @(negedge clk);
    end
    $display("phase %s done", name);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NUM_COPIES; k++) n_masked[k] = 0;
    repeat (2) @(negedge clk);
    run_phase("fault-free", 3'b000, 3000);
    run_phase("copy C faulty (case 1)", 3'b100, 4000);
    run_phase("copy A faulty (case 2)", 3'b001, 4000);
    run_phase("copy B faulty (case 2)", 3'b010, 4000);

    $display("events: full=%0d empty=%0d dropped_writes=%0d ignored_reads=%0d tests=%0d located=%0d masked A=%0d B=%0d C=%0d",
             n_full, n_empty, n_drop, n_ignored_rd, n_tests, n_located,
             n_masked[0], n_masked[1], n_masked[2]);
    expect_eq("full seen", 32'(n_full > 0), 32'd1);
    expect_eq("empty seen", 32'(n_empty > 0), 32'd1);
    expect_eq("dropped write seen", 32'(n_drop > 0), 32'd1);
    expect_eq("ignored read seen", 32'(n_ignored_rd > 0), 32'd1);
    expect_eq("online test seen", 32'(n_tests > 0), 32'd1);
    expect_eq("fault located seen", 32'(n_located > 0), 32'd1);
    for (int k = 0; k < NUM_COPIES; k++)
      expect_eq("corrupted word masked", 32'(n_masked[k] > 0), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
