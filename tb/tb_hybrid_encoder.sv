// tb_hybrid_encoder: a BIL stream of mapped indices for a small image, mixing
// bands of small (low-entropy) and large (high-entropy) values, is coded with
// the stand-in low-entropy coder and random output stalls; the codeword bits
// are compared with the hybrid coder reference, and the high/low/rescaling
// event counts with the reference counts.
module tb_hybrid_encoder;
  import ccsds_pkg::*;
  import ccsds_ref_pkg::*;
  import img_gen_pkg::*;
  localparam int NZ = 4, NX = 24, NY = 3;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  cfg_t cfg;
  logic in_valid, in_ready, lo_valid, lo_ready, lo_cw_valid, lo_cw_ready, lo_flush_req;
  logic lo_fl_valid, lo_fl_ready, lo_flush_done, out_valid, out_ready, out_end, ev_high, ev_low, ev_resc;
  mapped_t in_data;
  logic [D-1:0] lo_delta; logic [ZW-1:0] lo_z; logic [3:0] lo_code;
  logic [CW_W-1:0] lo_cw, lo_fl_cw, out_cw;
  logic [CL_W-1:0] lo_len, lo_fl_len, out_len;
  int lo_stalls;
  int checks = 0, failures = 0;

  hybrid_encoder #(.NZ(NZ)) dut (.*);
  loec_model u_lo (.clk, .rst_n, .lo_valid, .lo_ready, .lo_code, .lo_cw_valid, .lo_cw_ready,
    .lo_cw, .lo_len, .lo_flush_req, .lo_fl_valid, .lo_fl_ready, .lo_fl_cw, .lo_fl_len,
    .lo_flush_done, .stalls(lo_stalls));

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mapped[], nh, nl, nr, ne, hc, lc, rc, nbits, sent;
    bit bits[$];
    bit fin;
    cfg = base_cfg(NX, NY, NZ);
    mapped = new[NX*NY*NZ];
    foreach (mapped[i]) begin
      int z;
      z = (i / NX) % NZ;
      mapped[i] = (z == 0) ? $urandom_range(0, 2) : (z == 1) ? $urandom_range(0, 40) :
                  (z == 2) ? $urandom_range(0, 3000) : ($urandom_range(0, 9) == 0 ? 65000 : $urandom_range(0, 8));
    end
    hybrid(cfg, mapped, bits, nh, nl, nr, ne);
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    sent = 0; nbits = 0; fin = 0; hc = 0; lc = 0; rc = 0;
    while (!fin) begin
      @(negedge clk);
      in_valid = (sent < mapped.size());
      in_data.delta = D'(mapped[sent % mapped.size()]);
      in_data.z = ZW'((sent / NX) % NZ);
      in_data.first = (sent < NX*NZ) && (sent % NX == 0);
      in_data.last = (sent == mapped.size() - 1);
      out_ready = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (ev_high) hc++;
      if (ev_low) lc++;
      if (ev_resc) rc++;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        checks++;
        for (int b = int'(out_len) - 1; b >= 0; b--) begin
          if (nbits >= bits.size() || bits[nbits] != out_cw[b]) begin
            failures++;
            if (failures < 5) $display("bit %0d differs", nbits);
            break;
          end
          nbits++;
        end
        if (out_end) fin = 1;
      end
    end
    while (bits.size() > nbits && bits[bits.size()-1] == 0) void'(bits.pop_back());
    checks++;
    if (nbits != bits.size()) begin failures++; $display("%0d bits, expected %0d", nbits, bits.size()); end
    checks++;
    if (hc != nh || lc != nl || rc != nr || nh == 0 || nl == 0 || nr == 0) begin
      failures++; $display("events %0d/%0d %0d/%0d %0d/%0d", hc, nh, lc, nl, rc, nr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
