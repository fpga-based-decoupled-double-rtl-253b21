56a0c850075f6ed9
5935cc43067972a6
5b0cd01f04f675ff
5c26d3d402c078e0
5c8cd755ffc77b48
5c4ada9bfc047d33
5b6edd9ff7777e9f
5a09e061f2277f8c
5830e2e2ec267ff8
55f7e52ae58a7fe2
5374e742de737f4b
50bde937d7057e34
4de6eb16cf687c9d
4b02ecf1c7c97a88
4822eed8c05677f8
4553f0deb93d74ee
42a0f313b2ab716e
4010f587accb6d7c
3da7f847a7c2691b
3b63fb5ea3b1644f
3940fed5a0b35f1f
373802af9ed9598e
353d06ec9e2d53a3
33450b899eb34d63
313e107fa06246d5
2f1915c1a32d4000
2cc51b41a6fd38e9
2a3020ecabb3319a
274a26acb12e2a18
24062c6cb744226c
20563212bdca1a9d
1c323786c49312b3
17953caecb710ab6
127c4173d23802ae
0ce945bed8c0faa4
06e3497cdee1f29f
00734c9de47eeaa7
f9a94f13e97be2c6
f29650d5edc7db01
eb4e51dff158d362
e3ea522ff42bcbf0
dc8351cbf646c4b3
d53250b9f7b6bdb2
ce134f06f88fb6f3
c7404cc2f8ecb07f
c0d249fef8edaa5b
bae146d0f8b5a48d
b581434ef86b9f1c
b0c33f8ef8369a0c
acb53ba7f83b9564
a96037b0f8a19127
a6cb33bdf9878d5a
a4f42fe1fb0a8a01
a3da2c2cfd408720
a37428ab003984b8
a3b6256503fc82cd
a492226108898161
a5f71f9f0dd98074
a7d01d1e13da8008
aa091ad61a76801e
ac8c18be218d80b5
af4316c928fb81cc
b21a14ea30988363
b4fe130f38378578
b7de11283faa8808
baad0f2246c38b12
bd600ced4d558e92
bff00a7953359284
c25907b9583e96e5
c49d04a25c4f9bb1
c6c0012b5f4da0e1
c8c8fd516127a672
cac3f91461d3ac5d
ccbbf477614db29d
cec2ef815f9eb92b
d0e7ea3f5cd3c000
d33be4bf5903c717
d5d0df14544dce66
d8b6d9544ed2d5e8
dbfad39448bcdd94
dfaacdee4236e563
e3cec87a3b6ded4d
e86bc352348ff54a
ed84be8d2dc8fd52
f317ba422740055c
f91db684211f0d61
ff8db3631b821559
0657b0ed16851d3a
0d6aaf2b123924ff
14b2ae210ea82c9e
1c16add10bd53410
237dae3509ba3b4d
2aceaf47084a424e
31edb0fa0771490d
38c0b33e07144f81
3f2eb602071355a5
451fb930074b5b73
4a7fbcb2079560e4
4f3dc07207ca65f4
534bc45907c56a9c
