// Testbench for crossbar: random flits, selects and enables; each output
// must show, one clock edge later, the flit of the selected input with
// out_valid set, and keep out_valid low when not enabled.
module crossbar_tb;
  localparam int unsigned P = 5, W = 12;

  logic clk = 0, rst;
  logic [P-1:0][W-1:0] in_flit, out_flit, exp_flit;
  logic [P-1:0][2:0]   out_sel;
  logic [P-1:0]        out_en, out_valid, exp_valid;
  int checks = 0, failures = 0;

  crossbar #(.P(P), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in_flit = '0; out_sel = '0; out_en = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      for (int p = 0; p < P; p++) begin
        in_flit[p] = W'($urandom);
        out_sel[p] = 3'($urandom % P);
        out_en[p]  = $urandom % 2;
      end
      for (int p = 0; p < P; p++) begin
        exp_flit[p]  = in_flit[out_sel[p]];
        exp_valid[p] = out_en[p];
      end
      @(posedge clk); #1;
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (out_valid[p] != exp_valid[p] || (exp_valid[p] && out_flit[p] != exp_flit[p])) begin
          failures++;
          $display("cycle %0d out %0d: valid %b flit %h, expected %b %h", cyc, p,
                   out_valid[p], out_flit[p], exp_valid[p], exp_flit[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
