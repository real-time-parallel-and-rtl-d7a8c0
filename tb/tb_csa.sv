// tb_csa: checks the circular shift array against a reference model: random
// parallel loads, rotation by one place per enabled cycle, holding when en is
// low, and that after a load position k shows element (j + k) mod N j cycles
// later.
module tb_csa;
  localparam int N = 8, W = 12;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic signed [W-1:0] din [N], q [N];
  logic signed [W-1:0] model [N], v [N];
  int checks = 0, failures = 0, since_load = -1;

  csa #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) begin din[i] = '0; model[i] = '0; end
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int c = 0; c < 600; c++) begin
      en   <= ($urandom_range(5) != 0);
      load <= ($urandom_range(6) == 0);
      for (int i = 0; i < N; i++) din[i] <= W'($urandom);
      @(negedge clk);
      // model of the edge that just happened uses the values before it
      @(posedge clk);
      #1;
      if (en) begin
        if (load) begin
          for (int i = 0; i < N; i++) begin model[i] = din[i]; v[i] = din[i]; end
          since_load = 0;
        end else begin
          logic signed [W-1:0] t0;
          t0 = model[0];
          for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
          model[N-1] = t0;
          if (since_load >= 0) since_load++;
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("MISMATCH cycle %0d q[%0d]=%0d exp %0d", c, i, q[i], model[i]);
        end
      end
      if (since_load >= 0) begin
        checks++;
        if (q[3] !== v[(since_load + 3) % N]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
