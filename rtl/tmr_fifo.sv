// Fault-tolerant FIFO for a NoC router: triple modular redundancy (TMR) with
// the low-complexity voter.
//
// Three identical fifo_channel copies (modules A, B and C) receive the same
// inputs. Every output bit the router uses (rd_data, full, empty, count,
// test_busy, test_done) is combined by an ft_voter, which passes B when A and
// B agree and C when they do not. Any single faulty copy is therefore masked:
// if C is wrong, A = B carry the majority; if A or B is wrong, A != B and C is
// the majority. Each copy also checks its own memory online with the
// transparent SOA-MATS++ test; its verdict is reported per copy (test_fault,
// test_fault_bits, test_fault_addr) and is deliberately not voted, so that a
// fault the voter masks can still be located and reported.
//
// The triplication and the voter follow the description; which outputs are
// voted, the per-copy test report and the FIFO handshake (see fifo_channel:
// first-word fall-through, writes ignored while full, reads ignored while
// empty, both ignored while a test runs for 3*DEPTH cycles) are this
// implementation's choices. sa_en selects the copies whose memory gets the
// stuck-at fault described by sa_addr, sa_mask and sa_value; tie it to zero
// outside fault-injection experiments.
module tmr_fifo
  import ftf_pkg::*;
#(
  parameter  int unsigned WIDTH = 4,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // FIFO port (voted outputs)
  input  logic                             wr_en,
  input  logic [WIDTH-1:0]                 wr_data,
  input  logic                             rd_en,
  output logic [WIDTH-1:0]                 rd_data,
  output logic                             full,
  output logic                             empty,
  output logic [CW-1:0]                    count,
  // online memory test
  input  logic                             test_start,
  output logic                             test_busy,
  output logic                             test_done,
  output logic [NUM_COPIES-1:0]            test_fault,
  output logic [NUM_COPIES-1:0][WIDTH-1:0] test_fault_bits,
  output logic [NUM_COPIES-1:0][AW-1:0]    test_fault_addr,
  // stuck-at fault injection, per copy
  input  logic [NUM_COPIES-1:0]            sa_en,
  input  logic [AW-1:0]                    sa_addr,
  input  logic [WIDTH-1:0]                 sa_mask,
  input  logic [WIDTH-1:0]                 sa_value
);

  // Everything one copy drives that is voted, packed into one word so that a
  // single voter instance covers it.
  localparam int unsigned VW = WIDTH + 1 + 1 + CW + 1 + 1;

  logic [NUM_COPIES-1:0][WIDTH-1:0] c_rd_data;
  logic [NUM_COPIES-1:0]            c_full, c_empty, c_busy, c_done;
  logic [NUM_COPIES-1:0][CW-1:0]    c_count;
  logic [NUM_COPIES-1:0][VW-1:0]    c_vote;
  logic [VW-1:0]                    voted;

  for (genvar k = 0; k < NUM_COPIES; k++) begin : g_copy
    fifo_channel #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_chan (
      .clk             (clk),
      .rst_n           (rst_n),
      .wr_en           (wr_en),
      .wr_data         (wr_data),
      .rd_en           (rd_en),
      .rd_data         (c_rd_data[k]),
      .full            (c_full[k]),
      .empty           (c_empty[k]),
      .count           (c_count[k]),
      .test_start      (test_start),
      .test_busy       (c_busy[k]),
      .test_done       (c_done[k]),
      .test_fault      (test_fault[k]),
      .test_fault_bits (test_fault_bits[k]),
      .test_fault_addr (test_fault_addr[k]),
      .sa_en           (sa_en[k]),
      .sa_addr         (sa_addr),
      .sa_mask         (sa_mask),
      .sa_value        (sa_value)
    );
    assign c_vote[k] = {c_rd_data[k], c_full[k], c_empty[k], c_count[k], c_busy[k], c_done[k]};
  end

  ft_voter #(.WIDTH(VW)) u_voter (
    .a (c_vote[0]),
    .b (c_vote[1]),
    .c (c_vote[2]),
    .v (voted)
  );

  assign {rd_data, full, empty, count, test_busy, test_done} = voted;

endmodule
