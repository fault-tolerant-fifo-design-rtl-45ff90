// Self-checking testbench of fifo_mem.
//
// Fills every location with random words, reads them back through the
// asynchronous port against a shadow array, rewrites random locations, and
// then applies stuck-at faults: a write to the faulty location must store
// sa_value in the masked bits, every other bit and location must hold what
// was written.
module tb_fifo_mem;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = 3;

  int checks = 0;
  int failures = 0;

  logic             clk = 1'b0;
  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0, sa_addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata, sa_mask = '0, sa_value = '0;
  logic             sa_en = 1'b0;
  logic [WIDTH-1:0] shadow [DEPTH];

  always #5 clk = ~clk;

  fifo_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic write_word(input logic [AW-1:0] a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = a; wdata = d;
    @(negedge clk);
    we = 1'b0;
    shadow[a] = (sa_en && a == sa_addr) ? (d & ~sa_mask) | (sa_value & sa_mask) : d;
  endtask

  task automatic read_all(input string what);
    for (int i = 0; i < DEPTH; i++) begin
      logic [WIDTH-1:0] exp;
      raddr = AW'(i);
      #1;
      exp = shadow[i];
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL %s: addr %0d read %b expected %b", what, i, rdata, exp);
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) write_word(AW'(i), WIDTH'($urandom));
    read_all("fill");
    for (int n = 0; n < 40; n++) write_word(AW'($urandom), WIDTH'($urandom));
    read_all("rewrite");
    // the example word 1010 with a stuck-at-1 on its MSB
    write_word(3'd5, 4'b1010);
    sa_en = 1'b1; sa_addr = 3'd5; sa_mask = 4'b1000; sa_value = 4'b1000;
    write_word(3'd5, 4'b0101);
    read_all("stuck-at-1 MSB");
    checks++;
    raddr = 3'd5; #1;
    if (rdata !== 4'b1101) begin
      failures++;
      $display("FAIL: stored 0101 with MSB stuck at 1 reads %b, expected 1101", rdata);
    end
    for (int n = 0; n < 20; n++) begin
      sa_addr = AW'($urandom); sa_mask = WIDTH'($urandom); sa_value = WIDTH'($urandom);
      write_word(AW'($urandom), WIDTH'($urandom));
      read_all("random stuck-at");
    end
    sa_en = 1'b0;
    read_all("fault removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
