// tb_weight_update: self-checking test of the neighbourhood weight update.
//
// An 8x8 map with DIM = 3: random neuron and BMU positions, random weights
// and inputs in 0..10000 and a random NR vector with zeros in its tail.
// The neighbourhood index is compared with max(|dx|,|dy|) and each new
// lane with w - (w-x)*NR[index] from the reference arithmetic. Zero
// coefficients must leave the weights unchanged.
module tb_weight_update;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  localparam int S = 8, D = 3;
  logic [2:0] nx, ny, bx, by, nbh;
  logic [S-1:0][31:0] nr;
  logic [D-1:0][31:0] w, x, w_new;
  int checks = 0, failures = 0, zero_coef = 0;

  weight_update #(.MAP_SIDE(S), .DIM(D)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_t wv[], xv[], wn[];
    int e_nbh;
    wv = new[D]; xv = new[D];
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < S; i++)
        nr[i] = (i >= S - (t % 4)) ? 32'd0 : real_to_f32(0.6 * $exp(-real'(i*i) / 8.0) * real'($urandom_range(1, 100)) / 100.0);
      nx = 3'($urandom); ny = 3'($urandom); bx = 3'($urandom); by = 3'($urandom);
      for (int l = 0; l < D; l++) begin
        w[l] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
        x[l] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
        wv[l] = w[l]; xv[l] = x[l];
      end
      #1;
      e_nbh = ref_nbh(S, int'(ny)*S + int'(nx), int'(by)*S + int'(bx));
      ref_neuron_update(wv, xv, nr[e_nbh], wn);
      checks++;
      if (int'(nbh) != e_nbh) begin
        failures++;
        if (failures < 10) $display("MISMATCH nbh %0d expected %0d", nbh, e_nbh);
      end
      if (nr[e_nbh] == 0) zero_coef++;
      for (int l = 0; l < D; l++) begin
        checks++;
        if (!f32_same(w_new[l], wn[l])) begin
          failures++;
          if (failures < 10) $display("MISMATCH lane %0d: %h expected %h", l, w_new[l], wn[l]);
        end
      end
    end
    checks++;
    if (zero_coef == 0) begin
      failures++;
      $display("no zero-coefficient case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
