// Testbench for route_compute: all 256 header values. Codes 0..4 in the low
// three bits select outputs 0..4; codes 5..7 go to the local port (4); the
// upper data bits must not matter.
module route_compute_tb;
  logic [7:0] head_data;
  logic [2:0] out_port;
  int checks = 0, failures = 0;

  route_compute #(.P(5), .DATA_W(8)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int d = 0; d < 256; d++) begin
      head_data = 8'(d);
      #1;
      expected = (d % 8) < 5 ? (d % 8) : 4;
      checks++;
      if (int'(out_port) != expected) begin
        failures++;
        $display("data %b: port %0d expected %0d", head_data, out_port, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
