// tb_csm2: checks circular shift matrix II. A random N-vector is loaded every
// N enabled cycles (the snake moves one place per enabled cycle in between);
// in the cycle after each load, newest[] must be that vector and oldest[] the
// vector loaded N loads earlier (zero before that).
module tb_csm2;
  localparam int N = 8, W = 12, LOADS = 40;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic signed [W-1:0] din [N], newest [N], oldest [N];
  logic signed [W-1:0] h [LOADS][N];
  int checks = 0, failures = 0;

  csm2 #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int l = 0; l < N; l++) din[l] = '0;
    @(posedge clk); rst <= 0;
    for (int ld = 0; ld < LOADS; ld++) begin
      for (int c = 0; c < N; c++) begin
        while ($urandom_range(3) == 0) begin en <= 0; @(posedge clk); end
        en   <= 1;
        load <= (c == 0);
        for (int l = 0; l < N; l++) begin
          logic signed [W-1:0] r;
          r = W'($urandom);
          din[l] <= r;
          if (c == 0) h[ld][l] = r;
        end
        @(posedge clk);
        if (c == 0) begin
          #1;
          for (int l = 0; l < N; l++) begin
            checks += 2;
            if (newest[l] !== h[ld][l]) failures++;
            if (oldest[l] !== ((ld >= N) ? h[ld - N][l] : W'(0))) begin
              failures++;
              if (failures < 10) $display("MISMATCH oldest load %0d l=%0d", ld, l);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOADS * N * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
