// Self-checking testbench of soa_mats_tester.
//
// The tester is connected to a fifo_mem whose stuck-at fault model supplies
// the faults. For each scenario the memory is loaded through a side write port
// of the testbench, one test is run and the testbench checks:
//   - busy lasts exactly 3*DEPTH cycles and done pulses once right after it;
//   - with no fault: no fault reported and every location keeps its content
//     (the test is transparent);
//   - with a stuck-at fault on some bits of one location: fault set,
//     fault_bits equal to the stuck bits and fault_addr equal to that location,
//     and every fault-free location keeps its content.
// Scenarios: the 4-bit example word 1010 with a stuck-at-1 MSB, a stuck-at-0
// under a stored 1 (only the final read run can see it), and random faults.
module tb_soa_mats_tester;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = 3;

  int checks = 0;
  int failures = 0;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  logic             busy, done, fault;
  logic [WIDTH-1:0] fault_bits;
  logic [AW-1:0]    fault_addr;

  logic [AW-1:0]    t_addr;
  logic             t_we;
  logic [WIDTH-1:0] t_wdata, rdata;

  // testbench access to the memory while the tester is idle
  logic             tb_we = 1'b0;
  logic [AW-1:0]    tb_addr = '0;
  logic [WIDTH-1:0] tb_wdata = '0;

  logic             sa_en = 1'b0;
  logic [AW-1:0]    sa_addr = '0;
  logic [WIDTH-1:0] sa_mask = '0, sa_value = '0;

  logic [WIDTH-1:0] shadow [DEPTH];

  always #5 clk = ~clk;

  soa_mats_tester #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .mem_addr (t_addr), .mem_we (t_we), .mem_wdata (t_wdata), .mem_rdata (rdata),
    .fault, .fault_bits, .fault_addr
  );

  fifo_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) mem (
    .clk,
    .we    (busy ? t_we : tb_we),
    .waddr (busy ? t_addr : tb_addr),
    .wdata (busy ? t_wdata : tb_wdata),
    .raddr (busy ? t_addr : tb_addr),
    .rdata,
    .sa_en, .sa_addr, .sa_mask, .sa_value
  );

  task automatic load_random();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      tb_we = 1'b1; tb_addr = AW'(i); tb_wdata = WIDTH'($urandom);
      shadow[i] = tb_wdata;
    end
    @(negedge clk);
    tb_we = 1'b0;
  endtask

  task automatic load_word(input logic [AW-1:0] a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    tb_we = 1'b1; tb_addr = a; tb_wdata = d;
    shadow[a] = d;
    @(negedge clk);
    tb_we = 1'b0;
  endtask

  // Run one test; check its duration and outcome.
  task automatic run_test(input string what, input logic exp_fault,
                          input logic [WIDTH-1:0] exp_bits, input logic [AW-1:0] exp_addr);
    int busy_cycles = 0;
    int done_pulses = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      busy_cycles++;
      @(negedge clk);
      if (done) done_pulses++;
    end
    repeat (2) begin
      @(negedge clk);
      if (done) done_pulses++;
    end
    checks++;
    if (busy_cycles != 3 * DEPTH) begin
      failures++;
      $display("FAIL %s: busy for %0d cycles, expected %0d", what, busy_cycles, 3 * DEPTH);
    end
    checks++;
    if (done_pulses != 1) begin
      failures++;
      $display("FAIL %s: %0d done pulses", what, done_pulses);
    end
    checks++;
    if (fault !== exp_fault || (exp_fault && (fault_bits !== exp_bits || fault_addr !== exp_addr))) begin
      failures++;
      $display("FAIL %s: fault=%b bits=%b addr=%0d, expected fault=%b bits=%b addr=%0d",
               what, fault, fault_bits, fault_addr, exp_fault, exp_bits, exp_addr);
    end
    // transparency: every location without a fault still holds its word
    for (int i = 0; i < DEPTH; i++) begin
      if (!(sa_en && AW'(i) == sa_addr)) begin
        tb_addr = AW'(i);
        #1;
        checks++;
        if (rdata !== shadow[i]) begin
          failures++;
          $display("FAIL %s: location %0d holds %b after the test, expected %b",
                   what, i, rdata, shadow[i]);
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    load_random();
    run_test("fault-free", 1'b0, '0, '0);
    run_test("fault-free again", 1'b0, '0, '0);

    // the worked example: word 1010, stuck-at-1 on the MSB
    load_word(3'd2, 4'b1010);
    sa_en = 1'b1; sa_addr = 3'd2; sa_mask = 4'b1000; sa_value = 4'b1000;
    run_test("1010 with MSB stuck at 1", 1'b1, 4'b1000, 3'd2);

    // stuck-at-0 under a stored 1: invisible until the final read run
    sa_en = 1'b0;
    load_word(3'd6, 4'b0001);
    sa_en = 1'b1; sa_addr = 3'd6; sa_mask = 4'b0001; sa_value = 4'b0000;
    run_test("bit 0 stuck at 0 under a 1", 1'b1, 4'b0001, 3'd6);

    // random single-location faults
    for (int n = 0; n < 30; n++) begin
      sa_en = 1'b0;
      load_random();
      sa_addr  = AW'($urandom);
      sa_mask  = WIDTH'($urandom_range(1, (1 << WIDTH) - 1));
      sa_value = WIDTH'($urandom);
      sa_en    = 1'b1;
      run_test("random stuck-at", 1'b1, sa_mask, sa_addr);
    end

    sa_en = 1'b0;
    load_random();
    run_test("fault removed", 1'b0, '0, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
