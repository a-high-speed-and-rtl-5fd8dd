// tb_mac2s4b: end-to-end self-checking test of the 2-stage pipelined 4-bit
// signed MAC at its default parameters.
//
// The clock period is 10 time units; one MAC is issued per cycle. Operands are applied at falling edges; at each following
// falling edge the registered accumulator and the saturated output are
// compared with a reference pipeline kept here in integers:
//   product register <= x*y,  accumulator <= accumulator + product register
// with the accumulator wrapping modulo 2^16 and the output clamped to
// -128..127; the stored carry out is the carry of that unsigned 16-bit
// addition. Phases:
//   1. latency: a single product after reset must reach the accumulator on
//      exactly the second rising edge, not the first;
//   2. asynchronous set and reset of both pipeline registers;
//   3. 1000 random operand pairs;
//   4. runs of large products that drive the output into positive and
//      negative saturation and back through the pass-through range;
//   5. a run of (-8)*(-8) = 64 that overflows the 16-bit accumulator (the
//      limit of the 8 guard bits), checking that it wraps.
// Each mechanism is counted, and one that never occurred counts a failure.
module tb_mac2s4b;
  import mac_pkg::*;

  logic             clk = 1'b0, set_n, reset_n;
  logic [IN_W-1:0]  x, y;
  logic [OUT_W-1:0] out;
  logic [ACC_W-1:0] acc;
  logic             cout;

  int checks = 0, failures = 0;
  int cycles = 0;

  // Reference pipeline state.
  int prod_m;           // product register, -64..64
  logic [15:0] acc_m;   // accumulator, wraps like the hardware
  logic        cout_m;  // carry out of the last 16-bit addition

  // Mechanism counters.
  int n_sat_hi = 0, n_sat_lo = 0, n_pass = 0, n_guard = 0, n_neg_prod = 0;
  int n_wrap = 0, n_set = 0, n_reset = 0, n_latency = 0;

  mac2s4b dut (
    .clk(clk), .set_n(set_n), .reset_n(reset_n), .x(x), .y(y),
    .out(out), .acc(acc), .cout(cout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return (v > SAT_MAX) ? SAT_MAX : (v < SAT_MIN) ? SAT_MIN : v;
  endfunction

  task automatic check_state(input string what);
    int a_s;
    a_s = int'($signed(acc_m));
    checks++;
    if (acc !== acc_m || cout !== cout_m || int'($signed(out)) != sat(a_s)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s (cycle %0d): acc=%0d cout=%b out=%0d expected acc=%0d cout=%b out=%0d",
                 what, cycles, $signed(acc), cout, $signed(out), a_s, cout_m, sat(a_s));
    end
    if (a_s > SAT_MAX) n_sat_hi++;
    else if (a_s < SAT_MIN) n_sat_lo++;
    else n_pass++;
    if (a_s > SAT_MAX || a_s < SAT_MIN) n_guard++;
  endtask

  // One clock: apply operands at the falling edge, let the rising edge pass,
  // advance the reference and check at the next falling edge.
  task automatic mac_step(input int xv, input int yv);
    int full;
    x = IN_W'(xv);
    y = IN_W'(yv);
    @(posedge clk);
    full = int'($signed(acc_m)) + prod_m;
    if (full > 32767 || full < -32768) n_wrap++;
    cout_m = ({1'b0, acc_m} + {1'b0, 16'(prod_m)}) > 17'h0FFFF;
    acc_m  = 16'(full);
    prod_m = xv * yv;
    if (prod_m < 0) n_neg_prod++;
    @(negedge clk);
    check_state("mac");
  endtask

  task automatic do_reset();
    reset_n = 1'b0;
    #2;
    reset_n = 1'b1;
    acc_m  = '0;
    cout_m = 1'b0;
    prod_m = 0;
    n_reset++;
    check_state("reset");
  endtask

  initial begin
    int lat_edges;
    set_n = 1'b1; reset_n = 1'b1; x = '0; y = '0;
    @(negedge clk);
    do_reset();

    // 1. Latency.
    x = 4'd3; y = 4'd5;
    lat_edges = 0;
    for (int e = 1; e <= 4 && lat_edges == 0; e++) begin
      @(negedge clk);
      x = '0; y = '0;
      if (acc === 16'd15) lat_edges = e;
    end
    checks++;
    if (lat_edges != 2) begin
      failures++;
      $display("FAIL latency: product reached the accumulator after %0d rising edges, expected 2", lat_edges);
    end else n_latency++;
    @(negedge clk);
    do_reset();

    // 2. Asynchronous set: both registers go to all ones (product -1, sum -1).
    set_n = 1'b0;
    #1;
    checks++;
    if (acc !== 16'hFFFF || cout !== 1'b1 || $signed(out) != -1) begin
      failures++;
      $display("FAIL set: acc=%h cout=%b out=%h", acc, cout, out);
    end else n_set++;
    set_n = 1'b1;
    acc_m = 16'hFFFF; cout_m = 1'b1; prod_m = -1;
    mac_step(0, 0);           // sum = -1 + -1
    do_reset();

    // 3. The random workload: 1000 operand pairs.
    for (int i = 0; i < 1000; i++)
      mac_step(int'($urandom_range(15)) - 8, int'($urandom_range(15)) - 8);

    // 4. Drive into both saturation regions and back.
    do_reset();
    for (int i = 0; i < 8; i++)  mac_step(7, 7);    // +49 each: saturate high
    for (int i = 0; i < 16; i++) mac_step(-8, 7);   // -56 each: pass, then low
    for (int i = 0; i < 12; i++) mac_step(-8, -8);  // back up through 0

    // 5. Overflow of the 16-bit accumulator: 600 * 64 > 32767.
    do_reset();
    for (int i = 0; i < 600; i++) mac_step(-8, -8);
    begin
      int exp_wrapped;
      exp_wrapped = (599 * 64) - 65536;
      checks++;
      if (int'($signed(acc)) != exp_wrapped) begin
        failures++;
        $display("FAIL wrap: acc=%0d expected %0d", $signed(acc), exp_wrapped);
      end
    end

    $display("mechanisms: latency=%0d reset=%0d set=%0d sat_hi=%0d sat_lo=%0d pass=%0d guard=%0d neg_product=%0d wrap=%0d",
             n_latency, n_reset, n_set, n_sat_hi, n_sat_lo, n_pass, n_guard, n_neg_prod, n_wrap);
    if (n_latency == 0) begin failures++; $display("FAIL mechanism never seen: latency"); end
    if (n_reset == 0)   begin failures++; $display("FAIL mechanism never seen: reset"); end
    if (n_set == 0)     begin failures++; $display("FAIL mechanism never seen: set"); end
    if (n_sat_hi == 0)  begin failures++; $display("FAIL mechanism never seen: positive saturation"); end
    if (n_sat_lo == 0)  begin failures++; $display("FAIL mechanism never seen: negative saturation"); end
    if (n_pass == 0)    begin failures++; $display("FAIL mechanism never seen: pass-through"); end
    if (n_guard == 0)   begin failures++; $display("FAIL mechanism never seen: guard bits in use"); end
    if (n_neg_prod == 0) begin failures++; $display("FAIL mechanism never seen: negative product"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL mechanism never seen: accumulator wrap"); end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
