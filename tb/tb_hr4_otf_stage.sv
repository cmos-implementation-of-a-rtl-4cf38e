// Test of one on-the-fly conversion step: with QM = Q - 1 at the input, the
// outputs must be 4Q + q and 4Q + q - 1 for every digit code and for random
// Q (two's complement, small enough not to overflow the 17-bit word).
module tb_hr4_otf_stage;
  import hr4_pkg::*;
  localparam int W = 17;
  qdigit_t q;
  logic [W-1:0] q_in, qm_in, q_out, qm_out;
  int checks = 0, failures = 0;
  int qv, qi;
  hr4_otf_stage #(.W(W)) dut (.q(q), .q_in(q_in), .qm_in(qm_in), .q_out(q_out), .qm_out(qm_out));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 4000; t++) begin
      qi = int'($urandom_range(0, 20000)) - 10000;
      q = 3'(t % 8);
      q_in = W'(qi); qm_in = W'(qi - 1);
      #1;
      if (!q.u2) qv = q.add ? (q.u1 ? -2 : -1) : 0;
      else       qv = q.add ? 0 : (q.u1 ? 2 : 1);
      checks += 2;
      if (q_out != W'(4 * qi + qv)) begin
        failures++; $display("FAIL Q=%0d q=%0d out=%0d", qi, qv, $signed(q_out));
      end
      if (qm_out != W'(4 * qi + qv - 1)) begin
        failures++; $display("FAIL Q=%0d q=%0d qm_out=%0d", qi, qv, $signed(qm_out));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
