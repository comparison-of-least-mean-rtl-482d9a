// pfd_tb -- self-checking testbench for the sampled phase-frequency detector.
//
// Drives the reference and the feedback with edges placed on known sampling
// cycles: the reference falls (the detector compares the inverted
// reference) and the feedback rises a chosen number of cycles apart, either
// one first. For each comparison it checks that exactly one perr_valid
// arrives, that perr equals the edge distance in samples (positive when the
// reference leads), that UP alone (or DN alone) was high for that many
// samples, that the overlap lasted one sample, and that ref_edge_o pulsed
// once. A watchdog ends the run if the detector stops answering.
module pfd_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_i = 1'b1, fb_i = 1'b0;
  logic up, dn, ref_edge, perr_valid;
  logic signed [1:0]  pd;
  logic signed [11:0] perr;
  int checks = 0, failures = 0;
  int n_valid = 0, n_up = 0, n_dn = 0, n_both = 0, n_edge = 0, n_pd = 0;

  always #100 clk = ~clk;

  pfd dut (.clk, .rst_n, .ref_i, .fb_i, .up_o(up), .dn_o(dn), .pd_o(pd),
           .ref_edge_o(ref_edge), .perr_o(perr), .perr_valid_o(perr_valid));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (perr_valid) n_valid++;
    if (up && !dn) n_up++;
    if (dn && !up) n_dn++;
    if (up && dn) n_both++;
    if (ref_edge) n_edge++;
    n_pd += int'(pd);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int off;
  logic signed [11:0] got;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++) begin
      off = (k < 3) ? k - 1 : $urandom_range(0, 60) - 30;
      repeat (10) @(negedge clk);
      n_valid = 0; n_up = 0; n_dn = 0; n_both = 0; n_edge = 0; n_pd = 0;
      if (off >= 0) begin
        ref_i = 1'b0;
        repeat (off) @(negedge clk);
        fb_i = 1'b1;
      end else begin
        fb_i = 1'b1;
        repeat (-off) @(negedge clk);
        ref_i = 1'b0;
      end
      fork
        begin
          @(posedge clk iff perr_valid);
          got = perr;
        end
        begin
          repeat (200) @(posedge clk);
        end
      join_any
      disable fork;
      repeat (6) @(negedge clk);
      ref_i = 1'b1;
      fb_i  = 1'b0;
      repeat (6) @(negedge clk);
      check(n_valid == 1, $sformatf("one perr_valid per comparison (got %0d)", n_valid));
      check(got == 12'(off), $sformatf("perr %0d for offset %0d", got, off));
      check(n_up == (off > 0 ? off : 0) && n_dn == (off < 0 ? -off : 0),
            $sformatf("pulse widths up=%0d dn=%0d for offset %0d", n_up, n_dn, off));
      check(n_both == 1, $sformatf("overlap of %0d samples", n_both));
      check(n_pd == off, $sformatf("sum of pd %0d for offset %0d", n_pd, off));
      check(n_edge == 1, $sformatf("%0d reference edges", n_edge));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
