// madd_tb: self-checking testbench of madd.
//
// Drives a new random pair (b, c) into both organisations every cycle: the
// two-stage pipelined circuit (default, STAGES=2) and the original circuit
// (STAGES=1). A history of inputs gives the expected y = 3*b + c mod 2^32:
// inputs applied before rising edge k must appear on y after edge k+2 for
// the original circuit and after edge k+3 for the pipelined one, that is
// one result per cycle with latencies of 2 and 3 cycles. Edge values of b
// (0, 0xFFFF) and c (0, 0xFFFFFFFF) are mixed in to exercise the wrap.
module madd_tb;

  logic        clk = 1'b0;
  logic [15:0] b;
  logic [31:0] c, y2, y1;
  logic [31:0] hist[$];
  int          checks = 0, failures = 0;

  madd dut2 (.clk, .b, .c, .y(y2));
  madd #(.STAGES(1)) dut1 (.clk, .b, .c, .y(y1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("madd_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // y now holds the results of earlier inputs: hist[$] is the pair given
      // one edge ago, hist[$-1] two edges ago, hist[$-2] three edges ago
      if (t >= 3) begin
        checks += 2;
        e = hist[hist.size() - 3];
        if (y2 !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pipelined y=%h expected %h", t, y2, e);
        end
        e = hist[hist.size() - 2];
        if (y1 !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d original y=%h expected %h", t, y1, e);
        end
      end
      case ($urandom_range(0, 9))
        0:       begin b = 16'hFFFF; c = 32'hFFFF_FFFF; end
        1:       begin b = 16'h0;    c = $urandom();    end
        default: begin b = 16'($urandom()); c = $urandom(); end
      endcase
      hist.push_back(32'(b) * 32'd3 + c);
      if (hist.size() > 8) void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
