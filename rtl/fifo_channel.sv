// One FIFO channel: the redundant module that the TMR scheme triplicates.
//
// A circular buffer of DEPTH words of WIDTH bits with a write pointer, a read
// pointer and an occupancy counter, built around fifo_mem, plus the
// transparent SOA-MATS++ tester (soa_mats_tester) that checks the same memory
// online. The description calls for a FIFO buffer in a NoC router whose memory
// is tested during field operation; the pointer logic, the handshake and the
// way the tester shares the memory are this implementation's choices.
//
// Timing and handshake: the head word is on rd_data whenever empty is low
// (first-word fall-through, read combinationally from the array). wr_en writes
// wr_data at the rising edge if the FIFO is not full; rd_en drops the head word
// if it is not empty; both may happen in the same cycle. A write while full
// and a read while empty are ignored (the FIFO neither overflows nor
// underflows). test_start (one cycle, accepted while no test runs) hands the
// memory to the tester for 3*DEPTH cycles; while test_busy is high wr_en and
// rd_en are ignored and rd_data is not valid. The test leaves the stored words
// and the pointers as they were (unless a cell is faulty). The sa_* inputs are
// the stuck-at fault model of fifo_mem, tied low in normal use.
module fifo_channel #(
  parameter  int unsigned WIDTH = 4,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // FIFO port
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count,
  // online memory test
  input  logic             test_start,
  output logic             test_busy,
  output logic             test_done,
  output logic             test_fault,
  output logic [WIDTH-1:0] test_fault_bits,
  output logic [AW-1:0]    test_fault_addr,
  // stuck-at fault model of the memory cells
  input  logic             sa_en,
  input  logic [AW-1:0]    sa_addr,
  input  logic [WIDTH-1:0] sa_mask,
  input  logic [WIDTH-1:0] sa_value
);

  logic [AW-1:0]    wr_ptr_q, rd_ptr_q;
  logic [CW-1:0]    count_q;
  logic             do_wr, do_rd;

  logic             mem_we;
  logic [AW-1:0]    mem_waddr, mem_raddr;
  logic [WIDTH-1:0] mem_wdata, mem_rdata;

  logic [AW-1:0]    t_addr;
  logic             t_we;
  logic [WIDTH-1:0] t_wdata;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count_q == CW'(DEPTH));
  assign empty = (count_q == '0);
  assign count = count_q;
  assign do_wr = wr_en && !full && !test_busy;
  assign do_rd = rd_en && !empty && !test_busy;

  // memory port arbitration: the tester owns it while busy
  always_comb begin
    if (test_busy) begin
      mem_we    = t_we;
      mem_waddr = t_addr;
      mem_wdata = t_wdata;
      mem_raddr = t_addr;
    end else begin
      mem_we    = do_wr;
      mem_waddr = wr_ptr_q;
      mem_wdata = wr_data;
      mem_raddr = rd_ptr_q;
    end
  end

  assign rd_data = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (do_wr) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_rd) rd_ptr_q <= next_ptr(rd_ptr_q);
      if (do_wr && !do_rd)      count_q <= count_q + 1'b1;
      else if (do_rd && !do_wr) count_q <= count_q - 1'b1;
    end
  end

  fifo_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_mem (
    .clk      (clk),
    .we       (mem_we),
    .waddr    (mem_waddr),
    .wdata    (mem_wdata),
    .raddr    (mem_raddr),
    .rdata    (mem_rdata),
    .sa_en    (sa_en),
    .sa_addr  (sa_addr),
    .sa_mask  (sa_mask),
    .sa_value (sa_value)
  );

  soa_mats_tester #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_test (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (test_start),
    .busy       (test_busy),
    .done       (test_done),
    .mem_addr   (t_addr),
    .mem_we     (t_we),
    .mem_wdata  (t_wdata),
    .mem_rdata  (mem_rdata),
    .fault      (test_fault),
    .fault_bits (test_fault_bits),
    .fault_addr (test_fault_addr)
  );

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) count_q <= CW'(DEPTH));

endmodule
