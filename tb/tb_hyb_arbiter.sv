// tb_hyb_arbiter: all combinations of decision and back-pressure; checks
// that a sample goes to exactly its destination, that the tag is pushed
// exactly when the sample leaves, and the tag contents.
module tb_hyb_arbiter;
  import ccsds_pkg::*;
  logic in_valid, in_ready, high, resc, resc_bit, last;
  logic hi_valid, hi_ready, lo_valid, lo_ready, tag_valid, tag_ready;
  hyb_tag_t tag;
  int checks = 0, failures = 0;

  hyb_arbiter dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      bit go;
      {in_valid, high, resc, resc_bit, last, hi_ready, lo_ready} = 7'(i);
      tag_ready = 1'b1;
      if (i % 3 == 0) tag_ready = 1'b0;
      #1;
      go = in_valid && tag_ready && (high ? hi_ready : lo_ready);
      checks++;
      if (in_ready != (tag_ready && (high ? hi_ready : lo_ready)) ||
          (hi_valid && hi_ready) != (go && high) || (lo_valid && lo_ready) != (go && !high) ||
          (tag_valid && tag_ready) != go ||
          (go && (tag.high != high || tag.resc != resc || tag.resc_bit != resc_bit || tag.last != last))) begin
        failures++;
        if (failures < 5) $display("case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
