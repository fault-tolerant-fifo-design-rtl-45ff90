// Self-checking testbench of ft_voter.
//
// A single-bit voter is checked on all eight input combinations and an 8-bit
// voter on random words in which at most one of the three inputs differs from
// a reference word (the single-fault model) as well as on fully random words.
// The reference is the two-out-of-three majority (a&b | a&c | b&c), worked out
// independently of the XOR/MUX structure under test. A last part forces the
// voter's internal select S to 0 and to 1 while the three inputs agree and
// checks that such a fault on the voter does not reach its output.
module tb_ft_voter;

  int checks = 0;
  int failures = 0;

  logic       a1, b1, c1, v1;
  logic [7:0] a8, b8, c8, v8;

  ft_voter #(.WIDTH(1)) dut1 (.a(a1), .b(b1), .c(c1), .v(v1));
  ft_voter #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .c(c8), .v(v8));

  function automatic logic [7:0] majority(input logic [7:0] a, b, c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  task automatic check8(input string what);
    logic [7:0] exp;
    #1;
    exp = majority(a8, b8, c8);
    checks++;
    if (v8 !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h v=%h expected %h", what, a8, b8, c8, v8, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive single-bit truth table
    for (int i = 0; i < 8; i++) begin
      {a1, b1, c1} = 3'(i);
      #1;
      checks++;
      if (v1 !== ((a1 & b1) | (a1 & c1) | (b1 & c1))) begin
        failures++;
        $display("FAIL 1-bit: a=%b b=%b c=%b v=%b", a1, b1, c1, v1);
      end
    end
    // single faulty module: case 1 (C wrong) and case 2 (A or B wrong)
    for (int n = 0; n < 300; n++) begin
      logic [7:0] good, bad;
      good = 8'($urandom);
      bad  = 8'($urandom);
      a8 = good; b8 = good; c8 = good;
      unique case (n % 3)
        0: c8 = bad;
        1: a8 = bad;
        default: b8 = bad;
      endcase
      check8("single fault");
      checks++;
      if (v8 !== good) begin
        failures++;
        $display("FAIL: faulty module not masked, v=%h good=%h", v8, good);
      end
    end
    // fault on the voter itself: internal node S stuck at 0 or at 1 while the
    // three modules agree; the output must still be the common value
    for (int stuck = 0; stuck < 2; stuck++) begin
      if (stuck == 0) force dut8.s = 8'h00;
      else            force dut8.s = 8'hff;
      for (int n = 0; n < 50; n++) begin
        a8 = 8'($urandom); b8 = a8; c8 = a8;
        #1;
        checks++;
        if (v8 !== a8) begin
          failures++;
          $display("FAIL: S stuck at %0d, a=b=c=%h, v=%h", stuck, a8, v8);
        end
      end
      release dut8.s;
    end
    // arbitrary inputs: still a bitwise majority
    for (int n = 0; n < 300; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      check8("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
