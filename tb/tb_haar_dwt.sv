// tb_haar_dwt: self-checking test of the three-level Haar transform.
//
// Random 12-bit codes (plus a run of full-scale steps that force detail
// saturation) are fed at one sample every 4 clocks.  A reference model kept in
// the testbench applies A = floor((x0+x1)/2), D = sat12(x0-x1) level by level
// and queues the expected coefficients; every output of the block is compared
// with the head of its level's queue.  The rate is checked too: level i must
// give exactly N/2^i outputs for N inputs.
module tb_haar_dwt;
  import ecg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic    x_valid = 1'b0;
  sample_t x = '0;
  logic  [2:0] valid;
  coef_t [2:0] a, d;

  haar_dwt dut (.clk, .rst_n, .x_valid, .x, .valid, .a, .d);

  int checks = 0, failures = 0;
  int exp_a [3][$];
  int exp_d [3][$];
  int have_even [3] = '{0, 0, 0};
  int even_v [3];
  int n_out [3] = '{0, 0, 0};

  function automatic int sat12(int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  function automatic int floor_div2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic model_push(int lvl, int v);
    if (lvl > 2) return;
    if (have_even[lvl] == 0) begin
      even_v[lvl] = v;
      have_even[lvl] = 1;
    end else begin
      have_even[lvl] = 0;
      exp_a[lvl].push_back(floor_div2(even_v[lvl] + v));
      exp_d[lvl].push_back(sat12(even_v[lvl] - v));
      model_push(lvl + 1, floor_div2(even_v[lvl] + v));
    end
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) if (valid[i]) begin
      int ea, ed;
      n_out[i]++;
      checks++;
      if (exp_a[i].size() == 0) begin
        failures++;
        $display("FAIL level %0d: unexpected output", i + 1);
      end else begin
        ea = exp_a[i].pop_front();
        ed = exp_d[i].pop_front();
        if (int'(a[i]) != ea || int'(d[i]) != ed) begin
          failures++;
          $display("FAIL level %0d: A=%0d D=%0d expected A=%0d D=%0d", i + 1, a[i], d[i], ea, ed);
        end
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 1024;

  initial begin
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < N; k++) begin
      sample_t v;
      if (k >= 512 && k < 560) v = k[0] ? 12'h000 : 12'hFFF;   // saturating steps
      else                     v = sample_t'($urandom);
      @(posedge clk);
      x_valid <= 1'b1;
      x <= v;
      model_push(0, int'(coef_t'({~v[11], v[10:0]})));
      @(posedge clk);
      x_valid <= 1'b0;
      repeat (2) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_out[i] != (N >> (i + 1))) begin
        failures++;
        $display("FAIL level %0d gave %0d outputs, expected %0d", i + 1, n_out[i], N >> (i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
