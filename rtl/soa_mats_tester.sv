// Transparent SOA-MATS++ online test of a FIFO memory.
//
// The test checks every location i = 0 .. DEPTH-1 for stuck-at, transition and
// read-disturb faults without destroying its content. Each location gets three
// runs, one clock cycle each, with the read done combinationally through the
// memory's asynchronous port and the write at the end of the cycle:
//   run 0 (invert):  temp <- lut[i]; original <- temp; lut[i] <- ~temp
//   run 1 (restore): temp <- lut[i]; result = temp ^ original, expected all 1s;
//                    lut[i] <- ~temp   (the location holds its old value again)
//   run 2 (read):    temp <- lut[i]; result = temp ^ original, expected all 0s
// A 0 in the run-1 result or a 1 in the run-2 result marks a faulty bit. The
// three runs and the two expected patterns follow the description of the
// algorithm; the one-cycle-per-run schedule, and what is reported, are this
// implementation's own.
//
// Interface: a one-cycle start pulse while idle begins the test; busy is high
// for exactly 3*DEPTH cycles, starting the cycle after start, while the tester
// owns the memory port (mem_addr, mem_we, mem_wdata, mem_rdata); done pulses
// for one cycle after the last run. fault, fault_bits (OR of every deviating
// bit position) and fault_addr (first faulty location) describe the last test
// and are cleared when a new one starts. A location with a permanent fault may
// hold a changed value after the test, since it could not store ~temp.
module soa_mats_tester
  import ftf_pkg::*;
#(
  parameter  int unsigned WIDTH = 4,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // memory port, meaningful while busy
  output logic [AW-1:0]    mem_addr,
  output logic             mem_we,
  output logic [WIDTH-1:0] mem_wdata,
  input  logic [WIDTH-1:0] mem_rdata,
  // test outcome
  output logic             fault,
  output logic [WIDTH-1:0] fault_bits,
  output logic [AW-1:0]    fault_addr
);

  logic [AW-1:0]    addr_q;      // loop index i
  test_run_e        run_q;       // loop index j
  logic [WIDTH-1:0] original_q;  // backup of the location taken in run 0
  logic [WIDTH-1:0] temp;        // value read this cycle
  logic [WIDTH-1:0] result;      // temp ^ original
  logic [WIDTH-1:0] deviation;   // bits that differ from the expected pattern

  always_comb begin
    temp      = mem_rdata;
    result    = temp ^ original_q;
    mem_addr  = addr_q;
    mem_wdata = ~temp;
    mem_we    = busy && (run_q != RUN_READ);
    unique case (run_q)
      RUN_RESTORE: deviation = ~result;
      RUN_READ:    deviation = result;
      default:     deviation = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      addr_q     <= '0;
      run_q      <= RUN_INVERT;
      original_q <= '0;
      fault      <= 1'b0;
      fault_bits <= '0;
      fault_addr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy       <= 1'b1;
          addr_q     <= '0;
          run_q      <= RUN_INVERT;
          fault      <= 1'b0;
          fault_bits <= '0;
          fault_addr <= '0;
        end
      end else begin
        if (run_q == RUN_INVERT) original_q <= temp;
        if (deviation != '0) begin
          fault      <= 1'b1;
          fault_bits <= fault_bits | deviation;
          if (!fault) fault_addr <= addr_q;
        end
        unique case (run_q)
          RUN_INVERT:  run_q <= RUN_RESTORE;
          RUN_RESTORE: run_q <= RUN_READ;
          default: begin
            run_q <= RUN_INVERT;
            if (addr_q == AW'(DEPTH - 1)) begin
              busy   <= 1'b0;
              done   <= 1'b1;
              addr_q <= '0;
            end else begin
              addr_q <= addr_q + 1'b1;
            end
          end
        endcase
      end
    end
  end

endmodule
