// tb_fir_filter_edbns: end-to-end self-check of the reconfigurable 4-tap FIR
// filter built with double-base shift-and-add coefficient multipliers
// (ARCH = MULT_EDBNS), at 8-bit data and coefficients and 4 taps.
//
// The reference model keeps, for every accepted sample, the sample value and
// the coefficients that were stored when it arrived, and forms
// y[n] = sum_k b_k(n-k) * x[n-k]; that is exactly what a transposed filter
// computes, also across a coefficient reload in mid-stream. It checks every
// output value, that y_valid follows x_valid by exactly one cycle (one sample
// per cycle, latency one), and counts how often each mechanism happened:
// coefficient reloads while streaming, switches between signed and unsigned
// operation, idle cycles (x_valid = 0), and, from the control words the
// coefficient LUT produced, coefficients of one, two and three double-base
// terms, subtracted terms, and each of the POBG multiples x, 3x and 9x.
// A mechanism that never happened counts as a failure.
module tb_fir_filter_edbns;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic s_u = 1;
  logic coef_we = 0;
  logic [1:0] coef_addr = 0;
  logic [7:0] coef_data = 0;
  logic x_valid = 0;
  logic [7:0] x_in = 0;
  logic y_valid;
  logic signed [17:0] y_out;

  fir_filter #(.ARCH(MULT_EDBNS)) dut (
    .clk(clk), .rst_n(rst_n), .s_u(s_u),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .x_valid(x_valid), .x_in(x_in), .y_valid(y_valid), .y_out(y_out)
  );

  always #5 clk = ~clk;

  // Reference state.
  int stored [4];        // coefficient values as stored (extension at write time)
  int hist_x [4];        // hist_x[k] = x[n-k]
  int hist_b [4][4];     // hist_b[k][j] = coefficient j in effect when x[n-k] arrived
  int expected;
  bit expect_valid = 0;

  // Mechanism counters.
  int n_reload_streaming = 0, n_switch_to_signed = 0, n_switch_to_unsigned = 0;
  int n_idle = 0, n_samples = 0;
  int nterms_seen [4];   // coefficients written with 0..3 terms
  int neg_terms = 0;
  int pow3_seen [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val8(input logic [7:0] v, input logic signed_mode);
    return (signed_mode && v[7]) ? int'(v) - 256 : int'(v);
  endfunction

  // Cycle-level checker: on every rising edge compare the outputs with the
  // expectation formed at the previous edge, then update the model.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (y_valid !== expect_valid) begin
        failures++;
        $display("%0t: y_valid=%b want %b", $time, y_valid, expect_valid);
      end
      if (expect_valid) begin
        checks++;
        if (y_out !== 18'(expected)) begin
          failures++;
          $display("%0t: y_out=%0d want %0d", $time, y_out, expected);
        end
      end
    end
  end

  task automatic tick();
    // Inputs are stable now; compute what the DUT will produce at the edge.
    if (rst_n) begin
      expect_valid = x_valid;
      if (x_valid) begin
        int xv;
        n_samples++;
        xv = val8(x_in, s_u);
        for (int k = 3; k > 0; k--) begin
          hist_x[k] = hist_x[k-1];
          for (int j = 0; j < 4; j++) hist_b[k][j] = hist_b[k-1][j];
        end
        hist_x[0] = xv;
        for (int j = 0; j < 4; j++) hist_b[0][j] = stored[j];
        expected = 0;
        for (int k = 0; k < 4; k++) expected += hist_b[k][k] * hist_x[k];
      end else begin
        n_idle++;
      end
      if (coef_we) begin
        int nt;
        stored[coef_addr] = val8(coef_data, s_u);
        nt = 0;
        for (int t = 0; t < 3; t++) begin
          if (dut.g_edbns.u_coefs.w_word[t].en) begin
            nt++;
            if (dut.g_edbns.u_coefs.w_word[t].neg) neg_terms++;
            pow3_seen[dut.g_edbns.u_coefs.w_word[t].pow3]++;
          end
        end
        nterms_seen[nt]++;
      end
    end
    @(posedge clk);
    #2;
  endtask

  task automatic drive(input logic we, input logic [1:0] a, input logic [7:0] d,
                       input logic v, input logic [7:0] x);
    @(negedge clk);
    coef_we = we; coef_addr = a; coef_data = d; x_valid = v; x_in = x;
    tick();
  endtask

  task automatic load_all();
    for (int k = 0; k < 4; k++) drive(1'b1, 2'(k), 8'($urandom), 1'b0, 8'h00);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      stored[k] = 0; hist_x[k] = 0;
      for (int j = 0; j < 4; j++) hist_b[k][j] = 0;
    end
    for (int i = 0; i < 4; i++) nterms_seen[i] = 0;
    for (int i = 0; i < 3; i++) pow3_seen[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Impulse response with known coefficients, signed: 5, -3, 127, -128.
    s_u = 1;
    drive(1'b1, 2'd0, 8'd5, 1'b0, 8'd0);
    drive(1'b1, 2'd1, 8'hFD, 1'b0, 8'd0);
    drive(1'b1, 2'd2, 8'd127, 1'b0, 8'd0);
    drive(1'b1, 2'd3, 8'h80, 1'b0, 8'd0);
    drive(1'b0, 2'd0, 8'd0, 1'b1, 8'd1);
    for (int i = 0; i < 5; i++) drive(1'b0, 2'd0, 8'd0, 1'b1, 8'd0);

    // Several phases of random streaming.
    for (int phase = 0; phase < 12; phase++) begin
      logic new_mode;
      new_mode = (phase % 3 == 2) ? ~s_u : s_u;
      if (new_mode != s_u) begin
        // Drain nothing: switch mode and reload all coefficients while idle.
        @(negedge clk);
        if (new_mode) n_switch_to_signed++; else n_switch_to_unsigned++;
        s_u = new_mode;
        x_valid = 0; coef_we = 0;
        tick();
        load_all();
      end else begin
        load_all();
      end
      for (int t = 0; t < 300; t++) begin
        logic v, we;
        v  = ($urandom % 8) != 0;
        we = ($urandom % 40) == 0;
        if (we && v) n_reload_streaming++;
        drive(we, 2'($urandom), 8'($urandom), v,
              (t % 50 == 0) ? 8'h80 : (t % 50 == 1) ? 8'hFF : (t % 50 == 2) ? 8'h7F : 8'($urandom));
      end
    end
    drive(1'b0, 2'd0, 8'd0, 1'b0, 8'd0);
    drive(1'b0, 2'd0, 8'd0, 1'b0, 8'd0);

    checks++;
    if (n_reload_streaming == 0) begin failures++; $display("no coefficient reload while streaming"); end
    checks++;
    if (n_switch_to_signed == 0 || n_switch_to_unsigned == 0) begin failures++; $display("signed/unsigned switch not exercised"); end
    checks++;
    if (n_idle == 0) begin failures++; $display("no idle cycle"); end
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (nterms_seen[i] == 0) begin failures++; $display("no coefficient with %0d terms", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (pow3_seen[i] == 0) begin failures++; $display("POBG output %0d never selected", i); end
    end
    checks++;
    if (neg_terms == 0) begin failures++; $display("no subtracted term"); end
    $display("samples=%0d idle=%0d reloads_streaming=%0d to_signed=%0d to_unsigned=%0d",
             n_samples, n_idle, n_reload_streaming, n_switch_to_signed, n_switch_to_unsigned);
    $display("coefficients with 0/1/2/3 terms: %0d %0d %0d %0d, subtracted terms %0d, x/3x/9x used %0d %0d %0d",
             nterms_seen[0], nterms_seen[1], nterms_seen[2], nterms_seen[3], neg_terms,
             pow3_seen[0], pow3_seen[1], pow3_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
