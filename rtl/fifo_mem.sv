// Storage array of one FIFO channel, with a stuck-at fault model on its cells.
//
// DEPTH words of WIDTH bits. One synchronous write port (we, waddr, wdata,
// written at the rising clock edge) and one asynchronous read port (raddr,
// rdata), as a small distributed (LUT) RAM gives them. The FIFO pointers and
// the online memory test share these two ports.
//
// The sa_* inputs model stuck-at cell faults that develop in the field, the
// fault class the online memory test is meant to find: while sa_en is high,
// every write to location sa_addr stores the bits set in sa_mask as the
// matching bits of sa_value, whatever wdata holds. A cell keeps the value it
// held when the fault appeared until it is next written, which is how a fault
// gets excited by the test's own writes. With sa_en low the array is an
// ordinary RAM. This fault
// hook and the asynchronous read are this implementation's choices; the
// description names the FIFO memory and its locations 0..N-1 but gives no
// circuit for it. The array is not reset: the FIFO never reads a location it
// has not written.
module fifo_mem #(
  parameter  int unsigned WIDTH = 4,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  // stuck-at fault model
  input  logic             sa_en,
  input  logic [AW-1:0]    sa_addr,
  input  logic [WIDTH-1:0] sa_mask,
  input  logic [WIDTH-1:0] sa_value
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [WIDTH-1:0] stored;  // what the cells actually take on a write

  always_comb begin
    stored = wdata;
    if (sa_en && waddr == sa_addr) stored = (wdata & ~sa_mask) | (sa_value & sa_mask);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= stored;
  end

  assign rdata = mem[raddr];

endmodule
