// tb_delay_line: self-checking test of the behavioural delay elements.
//
// Three taps, 50 ps per element: after each change of din, tap i must
// follow exactly i*50 ps later, and not before.
`timescale 1ps / 1fs
module tb_delay_line;
  logic       din = 1'b0;
  logic [2:0] taps;
  int         checks = 0, failures = 0;

  delay_line #(.TAPS(3), .DELTA_FS(50000)) dut (.din(din), .taps(taps));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 40; i++) begin
      logic v;
      v   = ~din;
      din = v;
      #1;
      checks++; if (taps[0] !== v) begin failures++; $display("tap0 late"); end
      #48;
      checks++; if (taps[1] === v) begin failures++; $display("tap1 early"); end
      #2;
      checks++; if (taps[1] !== v) begin failures++; $display("tap1 not at 50 ps"); end
      #48;
      checks++; if (taps[2] === v) begin failures++; $display("tap2 early"); end
      #2;
      checks++; if (taps[2] !== v) begin failures++; $display("tap2 not at 100 ps"); end
      #(200 + $urandom % 500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
