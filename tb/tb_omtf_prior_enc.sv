// tb_omtf_prior_enc -- self-checking test of the reference-hit priority encoder.
//
// Loads random 128-bit vectors (sparse, dense, empty, single-bit) every 4th
// clock and checks that the 4 codes that follow are the 4 lowest set bits of
// the loaded vector in increasing order, and that `found` drops once the vector
// is used up. The expected values come from a plain scan of the loaded vector.
module tb_omtf_prior_enc;
  localparam int unsigned W = 128;
  logic clk = 0, rst = 1, load = 0;
  logic [W-1:0] bits_in = '0;
  logic found;
  logic [6:0] code;
  int checks = 0, failures = 0;

  omtf_prior_enc dut (.clk, .rst, .load, .ref_hit_bits(bits_in), .found, .code);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector(input logic [W-1:0] v);
    int exp_idx [$];
    for (int i = 0; i < W; i++) if (v[i]) exp_idx.push_back(i);
    @(negedge clk); bits_in = v; load = 1;
    @(negedge clk); load = 0;
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (k < exp_idx.size()) begin
        if (!found || code != 7'(exp_idx[k])) begin
          failures++;
          $display("FAIL k=%0d found=%0b code=%0d exp=%0d", k, found, code, exp_idx[k]);
        end
      end else if (found) begin
        failures++;
        $display("FAIL k=%0d found set, code=%0d, none expected", k, code);
      end
      @(negedge clk);
    end
  endtask

  // back-to-back BXs: load every 4th clock, code on load clock is old vector's 4th
  task automatic run_stream(int n);
    logic [W-1:0] v, prev;
    int exp_idx [$];
    prev = '0;
    for (int b = 0; b < n; b++) begin
      v = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      if (b % 5 == 0) v = '0;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        load = (k == 0); bits_in = v;
        #1;
        if (b > 0 && k == 0) begin
          exp_idx.delete();
          for (int i = 0; i < W; i++) if (prev[i]) exp_idx.push_back(i);
          checks++;
          if (exp_idx.size() > 3 ? (!found || code != 7'(exp_idx[3])) : found) begin
            failures++;
            $display("FAIL stream load-clock code=%0d found=%0b", code, found);
          end
        end
      end
      prev = v;
    end
    @(negedge clk); load = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++;
    if (found) begin failures++; $display("FAIL found after reset"); end
    run_vector('0);
    run_vector(128'h1);
    run_vector(128'h8000_0000_0000_0000_0000_0000_0000_0000);
    run_vector(128'h0000_0000_0100_0000_0000_0000_0000_0080);
    run_vector('1);
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] v;
      v = {$urandom, $urandom, $urandom, $urandom};
      case (t % 4)
        0: v = v & {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
        1: v = 128'(1) << ($urandom % W);
        2: v = (128'(1) << ($urandom % W)) | (128'(1) << ($urandom % W));
        default: ;
      endcase
      run_vector(v);
    end
    run_stream(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
