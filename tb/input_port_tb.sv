// Testbench for input_port: flits arrive on random VCs (never more than K
// outstanding per VC, as credits would ensure) while random VCs are popped.
// Per-VC queue models check the demultiplexing, the FIFO order of each VC,
// the empty flags, the output multiplexer under sel_vc, and one credit_out
// pulse in the cycle after each pop.
module input_port_tb;
  import router_pkg::*;
  localparam int unsigned V = 4, K = 4, DATA_W = 8;

  logic clk = 0, rst, in_valid;
  logic [1:0] in_type, out_type;
  logic [1:0] in_vc, sel_vc;
  logic [DATA_W-1:0] in_data, out_data;
  logic [V-1:0] credit_out, pop, vc_empty, last_pop;
  logic [V-1:0][1:0] front_type;
  logic [V-1:0][DATA_W-1:0] front_data;
  int checks = 0, failures = 0;
  logic [9:0] model[V][$];

  input_port #(.V(V), .K(K), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pv;
    rst = 1; in_valid = 0; in_type = '0; in_vc = '0; in_data = '0; pop = '0; sel_vc = '0;
    last_pop = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      #1;
      for (int v = 0; v < V; v++) begin
        checks++;
        if (vc_empty[v] != (model[v].size() == 0)) begin
          failures++; $display("cycle %0d vc %0d empty=%b model size %0d", cyc, v, vc_empty[v], model[v].size());
        end
        if (model[v].size() > 0) begin
          checks++;
          if ({front_type[v], front_data[v]} != model[v][0]) begin
            failures++; $display("cycle %0d vc %0d front %h expected %h", cyc, v, {front_type[v], front_data[v]}, model[v][0]);
          end
        end
      end
      checks++;
      if (credit_out != last_pop) begin failures++; $display("cycle %0d credit_out %b expected %b", cyc, credit_out, last_pop); end
      sel_vc = 2'($urandom);
      #1;
      if (model[sel_vc].size() > 0) begin
        checks++;
        if ({out_type, out_data} != model[sel_vc][0]) begin failures++; $display("output mux wrong"); end
      end
      // stimulus
      in_vc    = 2'($urandom);
      in_valid = (model[in_vc].size() < K) && ($urandom % 3 != 0);
      in_type  = 2'($urandom);
      in_data  = DATA_W'($urandom);
      pv = $urandom % V;
      pop = (model[pv].size() > 0 && $urandom % 2 == 1) ? V'(1) << pv : '0;
      @(posedge clk); #1;
      last_pop = pop;
      for (int v = 0; v < V; v++) if (pop[v]) void'(model[v].pop_front());
      if (in_valid) model[in_vc].push_back({in_type, in_data});
      in_valid = 0; pop = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
