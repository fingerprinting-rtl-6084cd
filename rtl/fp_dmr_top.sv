// fp_dmr_top: the fingerprinting and checkpoint logic of a DMR processor
// pair.
//
// Two processors run the same program in lockstep (possibly with a fixed
// delay between them). Each has its own fp_node, which fingerprints that
// processor's retiring updates, keeps its checkpoint and compares
// fingerprints with the other node at the end of every checkpoint
// interval and before every irreversible operation. The two nodes are
// joined only through their fingerprint links: in the intended system the
// mirrored processors sit on different boards of a cluster and the links
// run over the system area network, so the link ports (tx_*, rx_*) are
// brought out, as are the processors' retire, register-file and memory
// ports. Index 0 is one processor, index 1 its mirror; connect tx_*[0] to
// rx_*[1] and tx_*[1] to rx_*[0] through whatever latency the network has.
//
// Every port is an array over the two nodes; see fp_node for their meaning
// and timing, and for SPEC_FP, which selects between fingerprinting
// committed state (default) and fingerprinting results as they complete
// (cmp_* ports; ignored in the default). Parameters are the same for both
// nodes.
module fp_dmr_top
  import fp_pkg::*;
#(
  parameter int unsigned CKPT_INTERVAL = 32768,
  parameter int unsigned NREGS         = 64,
  parameter int unsigned LINE_W        = LINE_BYTES * 8,
  parameter int unsigned LOG_DEPTH     = 256,
  parameter int unsigned LINK_W        = 8,
  parameter bit          SPEC_FP       = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  retire_t [1:0]                        ret,
  input  logic    [1:0]                        st_first_wr,
  input  logic    [1:0][LINE_W-1:0]            st_old_line,
  output logic    [1:0]                        ret_ready,
  input  logic    [1:0]                        cmp_valid,
  input  word_t   [1:0]                        cmp_result,
  input  logic    [1:0][NREGS-1:0][DATA_W-1:0] arf,
  output logic    [1:0]                        arf_restore_valid,
  output logic    [1:0][NREGS-1:0][DATA_W-1:0] arf_restore,
  output logic    [1:0]                        restart,
  output logic    [1:0]                        mem_rst_valid,
  output laddr_t  [1:0]                        mem_rst_addr,
  output logic    [1:0][LINE_W-1:0]            mem_rst_data,
  output logic    [1:0]                        tx_valid,
  output logic    [1:0][LINK_W-1:0]            tx_data,
  input  logic    [1:0]                        rx_valid,
  input  logic    [1:0][LINK_W-1:0]            rx_data,
  output fp_t     [1:0]                        fp,
  output ck_state_e [1:0]                      state,
  output logic    [1:0]                        ckpt_taken,
  output logic    [1:0]                        error_detected
);

  for (genvar n = 0; n < 2; n++) begin : g_node
    fp_node #(
      .CKPT_INTERVAL (CKPT_INTERVAL),
      .NREGS         (NREGS),
      .LINE_W        (LINE_W),
      .LOG_DEPTH     (LOG_DEPTH),
      .LINK_W        (LINK_W),
      .SPEC_FP       (SPEC_FP)
    ) u_node (
      .clk, .rst_n,
      .ret               (ret[n]),
      .st_first_wr       (st_first_wr[n]),
      .st_old_line       (st_old_line[n]),
      .ret_ready         (ret_ready[n]),
      .cmp_valid         (cmp_valid[n]),
      .cmp_result        (cmp_result[n]),
      .arf               (arf[n]),
      .arf_restore_valid (arf_restore_valid[n]),
      .arf_restore       (arf_restore[n]),
      .restart           (restart[n]),
      .mem_rst_valid     (mem_rst_valid[n]),
      .mem_rst_addr      (mem_rst_addr[n]),
      .mem_rst_data      (mem_rst_data[n]),
      .tx_valid          (tx_valid[n]),
      .tx_data           (tx_data[n]),
      .rx_valid          (rx_valid[n]),
      .rx_data           (rx_data[n]),
      .fp                (fp[n]),
      .state             (state[n]),
      .ckpt_taken        (ckpt_taken[n]),
      .error_detected    (error_detected[n])
    );
  end

endmodule
