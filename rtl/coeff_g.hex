8028d7
028a43
032662
04315b
04afc6
044221
02c66d
006b75
824add
849bfc
85bd08
851c22
829c7c
0146d9
058508
08c133
09aba6
077152
021a1b
854b54
8cc4b3
91d163
92050f
8bb237
0187d5
14786d
2a7694
3fe2e8
50e578
5a4df3
